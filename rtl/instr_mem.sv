// instr_mem: byte-addressed instruction memory.
//
// Read side: combinational; returns the ten bytes starting at pc (the longest
// Y86-64 instruction), byte k in bits [8k+7:8k]. Bytes past the end of memory
// read as zero; fetch flags such an instruction as an address error.
// Write side: one byte per clock edge when we = 1, used to load a program
// before it runs. Size (IMEM_BYTES) and the loading port are this design's
// choice; the instruction memory itself is only named by the pipeline it
// serves. Instruction and data memory are separate arrays.
module instr_mem
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  word_t       waddr,
  input  logic [7:0]  wdata,
  input  word_t       pc,
  output logic [79:0] ibytes
);

  localparam word_t SIZE = word_t'(IMEM_BYTES);
  localparam int unsigned AW = $clog2(IMEM_BYTES);

  logic [7:0] mem [IMEM_BYTES];

  always_ff @(posedge clk) begin
    if (we && waddr < SIZE) mem[waddr[AW-1:0]] <= wdata;
  end

  always_comb begin
    for (int k = 0; k < 10; k++) begin
      word_t a;
      a = pc + word_t'(k);
      ibytes[8*k +: 8] = (a < SIZE) ? mem[a[AW-1:0]] : 8'h00;
    end
  end

endmodule
