// data_mem: byte-addressed data memory used by the memory stage.
//
// Reads and writes 8-byte little-endian words at any byte address. The read
// is combinational (valM is available in the same memory-stage cycle); a
// write takes effect at the rising clock edge. An access whose 8 bytes are
// not all inside the memory does nothing and raises err (address error
// status). A second, byte-wide port (dbg_*) lets a test bench preload data
// and inspect results; it writes at the clock edge and reads combinationally,
// and the pipeline port wins if both write the same byte. Size and the debug
// port are this design's choice.
module data_mem
  import y86_pkg::*;
#(
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rd,
  input  logic       wr,
  input  word_t      addr,
  input  word_t      wdata,
  output word_t      rdata,
  output logic       err,
  input  logic       dbg_we,
  input  word_t      dbg_addr,
  input  logic [7:0] dbg_wdata,
  output logic [7:0] dbg_rdata
);

  localparam int unsigned AW = $clog2(DMEM_BYTES);

  localparam word_t SIZE = word_t'(DMEM_BYTES);

  logic [7:0] mem [DMEM_BYTES];
  logic       in_range;

  assign in_range = (addr <= SIZE - 64'd8);
  assign err      = (rd || wr) && !in_range;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      rdata[8*k +: 8] = (rd && in_range) ? mem[AW'(addr + word_t'(k))] : 8'h00;
    end
  end

  assign dbg_rdata = (dbg_addr < SIZE) ? mem[dbg_addr[AW-1:0]] : 8'h00;

  always_ff @(posedge clk) begin
    if (dbg_we && dbg_addr < SIZE) mem[dbg_addr[AW-1:0]] <= dbg_wdata;
    if (wr && in_range) begin
      for (int k = 0; k < 8; k++) begin
        mem[AW'(addr + word_t'(k))] <= wdata[8*k +: 8];
      end
    end
  end

endmodule
