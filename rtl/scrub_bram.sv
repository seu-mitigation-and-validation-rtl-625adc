// One copy of a scrubbed on-chip memory: an inferred true dual-port block RAM.
//
// Port 0 belongs to the background scrubber and port 1 to the processor, as
// in the published memory mitigation scheme, which scrubs through the port
// the processor leaves unused. Both ports read synchronously in read-first
// mode: the word present at a clock edge appears on rdata after that edge.
// Port 1 writes with byte enables (be[i] enables bits 8*i+7:8*i); port 0
// always writes the whole word. If both ports write the same word in one
// cycle, port 1 wins; the scrubber is built so that this never happens.
//
// The initial contents come from INIT_FILE (hex, one word per line) when it is
// not empty, otherwise the memory starts cleared. Triplication and voting are
// done one level up; this module is a plain memory.
module scrub_bram #(
  parameter int unsigned DEPTH     = 8192,
  parameter int unsigned DW        = 32,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH),
  localparam int unsigned NB       = DW / 8
) (
  input  logic          clk,
  // port 0: scrubber
  input  logic [AW-1:0] a0_addr,
  input  logic          a0_we,
  input  logic [DW-1:0] a0_wdata,
  output logic [DW-1:0] a0_rdata,
  // port 1: processor
  input  logic [AW-1:0] a1_addr,
  input  logic          a1_we,
  input  logic [NB-1:0] a1_be,
  input  logic [DW-1:0] a1_wdata,
  output logic [DW-1:0] a1_rdata
);

  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    a0_rdata <= mem[a0_addr];
    a1_rdata <= mem[a1_addr];
    if (a0_we && !(a1_we && (a1_addr == a0_addr))) mem[a0_addr] <= a0_wdata;
    if (a1_we) begin
      for (int b = 0; b < int'(NB); b++)
        if (a1_be[b]) mem[a1_addr][8*b +: 8] <= a1_wdata[8*b +: 8];
    end
  end

endmodule
