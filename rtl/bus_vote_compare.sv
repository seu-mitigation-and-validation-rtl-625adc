// Bus-signal vote and compare stage of the processor comparison.
//
// Both processors under test are triplicated, so each one presents three
// copies of its bus signals (W = 104 bits). In each TMR domain d this stage
// votes the three copies of core 1's bus and the three copies of core 2's
// bus, and compares the two voted buses bit by bit. The result, one mismatch
// bit per bus bit, is registered on the domain's clock, so the comparison
// itself exists three times and an upset in one copy of it is outvoted later.
//
// Interface: per-domain clock and synchronous active-low reset, the three
// copies of each core's bus, and the registered mismatch vector of each
// domain. Latency: one clock from the bus signals to mis.
module bus_vote_compare #(
  parameter int unsigned W = 104,
  localparam int unsigned NDOM = 3
) (
  input  logic [NDOM-1:0]        clk,
  input  logic [NDOM-1:0]        rst_n,
  input  logic [NDOM-1:0][W-1:0] core1_bus,
  input  logic [NDOM-1:0][W-1:0] core2_bus,
  output logic [NDOM-1:0][W-1:0] mis
);

  logic [NDOM-1:0][W-1:0] c1_v, c2_v;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    tmr_voter #(.W(W)) u_vote_c1 (
      .a(core1_bus[0]), .b(core1_bus[1]), .c(core1_bus[2]), .y(c1_v[d])
    );
    tmr_voter #(.W(W)) u_vote_c2 (
      .a(core2_bus[0]), .b(core2_bus[1]), .c(core2_bus[2]), .y(c2_v[d])
    );

    logic [W-1:0] mis_q;

    always_ff @(posedge clk[d]) begin
      if (!rst_n[d]) mis_q <= '0;
      else           mis_q <= c1_v[d] ^ c2_v[d];
    end

    assign mis[d] = mis_q;
  end

endmodule
