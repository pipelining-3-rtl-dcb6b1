// tb_data_mem: random 8-byte reads and writes at random (also unaligned)
// byte addresses of the 1 KiB data memory, compared with a byte-array model;
// accesses that do not fit must raise err and leave memory unchanged. The
// debug byte port is used to preload and to read back.
`timescale 1ns/1ps
module tb_data_mem;
  import y86_pkg::*;
  logic       clk = 0, rd = 0, wr = 0, err, dbg_we = 0;
  word_t      addr = '0, wdata = '0, rdata, dbg_addr = '0;
  logic [7:0] dbg_wdata = '0, dbg_rdata;
  logic [7:0] ref_mem [1024];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .rd, .wr, .addr, .wdata, .rdata, .err,
                .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      dbg_we = 1; dbg_addr = word_t'(i); dbg_wdata = 8'($urandom); ref_mem[i] = dbg_wdata;
      @(negedge clk);
    end
    dbg_we = 0;
    for (int i = 0; i < 6000; i++) begin
      bit fits;
      addr = ($urandom_range(15) == 0) ? word_t'(1010 + $urandom_range(30)) : word_t'($urandom_range(1016));
      fits = (int'(addr) + 8 <= 1024);
      if ($urandom_range(1)) begin
        rd = 1; wr = 0;
        #1;
        check(err == !fits, $sformatf("read err at %0d", addr));
        if (fits)
          for (int k = 0; k < 8; k++)
            check(rdata[8*k +: 8] == ref_mem[int'(addr) + k], $sformatf("read %0d byte %0d", addr, k));
      end else begin
        rd = 0; wr = 1; wdata = {$urandom, $urandom};
        #1;
        check(err == !fits, $sformatf("write err at %0d", addr));
        if (fits) for (int k = 0; k < 8; k++) ref_mem[int'(addr) + k] = wdata[8*k +: 8];
      end
      @(negedge clk);
      rd = 0; wr = 0;
    end
    for (int i = 0; i < 1024; i++) begin
      dbg_addr = word_t'(i);
      #1;
      check(dbg_rdata == ref_mem[i], $sformatf("final byte %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
