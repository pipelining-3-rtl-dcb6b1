// regfile: the fifteen 64-bit Y86-64 registers (%rax .. %r14).
//
// Two combinational read ports serve decode (srcA, srcB); two write ports
// serve writeback (dstE <- valE, dstM <- valM), written at the rising clock
// edge. Register number 0xF means "no register": it reads as zero and a write
// to it is dropped. If both write ports name the same register, the memory
// port (dstM) wins. There is no write-to-read bypass inside the file: a value
// being written back this cycle reaches decode through the forwarding MUXes.
// A third read port (dbg) lets a test bench inspect the registers. Reset
// clears every register (this design's choice).
module regfile
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  regid_t srcA,
  input  regid_t srcB,
  output word_t  rvalA,
  output word_t  rvalB,
  input  regid_t dstE,
  input  word_t  valE,
  input  regid_t dstM,
  input  word_t  valM,
  input  regid_t dbg_reg,
  output word_t  dbg_val
);

  word_t r [15];

  assign rvalA   = (srcA == R_NONE) ? '0 : r[srcA];
  assign rvalB   = (srcB == R_NONE) ? '0 : r[srcB];
  assign dbg_val = (dbg_reg == R_NONE) ? '0 : r[dbg_reg];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) r[i] <= '0;
    end else begin
      if (dstE != R_NONE) r[dstE] <= valE;
      if (dstM != R_NONE) r[dstM] <= valM;
    end
  end

endmodule
