// Background memory scrubber of one TMR domain.
//
// The scrubber walks through every address of its memory copy, alternating a
// read cycle and a write cycle per address: in the read cycle it presents the
// address on the scrubber port; in the following write cycle it writes back
// the word voted from the three memory copies, so an upset in one copy is
// repaired before a second one can join it. One full pass therefore takes
// 2*DEPTH clock cycles when nothing pauses it.
//
// The scrubber's own state (address and read/write phase) is triplicated: it
// leaves on addr_q/wr_q, is voted with the other two domains outside, and the
// voted value comes back on addr_v/wr_v, so a scrubber upset in one domain is
// corrected on the next clock.
//
// pause stops scrubbing while the processor writes this memory. A pause in a
// read cycle repeats that read; a pause in a write cycle drops the write and
// goes back to reading the same address, so a stale word read before a
// processor write is never written back. pass_done pulses in the write cycle
// of the last address. Reset (active low, synchronous) starts at address 0
// in the read phase.
//
// The read/write alternation, the voted write-back and the pause on processor
// writes follow the published scheme; the exact pause rule, the voting of the
// address and phase, and the reset are this design's choices.
module mem_scrubber #(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pause,
  // voted state from the three domains
  input  logic [AW-1:0] addr_v,
  input  logic          wr_v,
  // this domain's state, to the voters
  output logic [AW-1:0] addr_q,
  output logic          wr_q,
  // memory port 0 control
  output logic [AW-1:0] mem_addr,
  output logic          mem_we,
  output logic          pass_done
);

  logic [AW-1:0] addr_n;
  logic          wr_n;

  always_comb begin
    mem_addr  = addr_v;
    mem_we    = wr_v && !pause;
    pass_done = mem_we && (addr_v == AW'(DEPTH - 1));
    addr_n    = addr_v;
    wr_n      = 1'b0;
    if (!pause) begin
      if (!wr_v) begin
        wr_n = 1'b1;                   // read issued, write back next cycle
      end else begin
        addr_n = (addr_v == AW'(DEPTH - 1)) ? '0 : addr_v + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_q <= '0;
      wr_q   <= 1'b0;
    end else begin
      addr_q <= addr_n;
      wr_q   <= wr_n;
    end
  end

endmodule
