// Bus-signal vote and reduce stage, with the failure catch register.
//
// In each TMR domain d the three copies of the W-bit mismatch vector from the
// compare stage are voted and OR-reduced into one disagreement bit, which is
// registered: disagree[d] is high in the cycles in which the processors
// disagree. When two or more of the three disagreement bits are high, the
// failure register is set and stays set until reset, so a single disagreement
// is caught even if it lasts one cycle. The failure register is triplicated
// with its feedback voted, so an upset in one copy is undone on the next
// clock; a single wrong disagreement bit cannot set it. Off chip the three
// copies of every status bit are voted again.
//
// Interface: per-domain clock and synchronous active-low reset (reset clears
// the failure register), the three mismatch vectors, and per domain the
// disagreement and failure bits. Latency: disagree one clock after mis, fail
// one clock after disagree.
//
// The 2-of-3 catch and the sticky, triplicated register follow the published
// harness; voting the register's feedback and clearing it only by reset are
// this design's choices.
module bus_vote_reduce #(
  parameter int unsigned W = 104,
  localparam int unsigned NDOM = 3
) (
  input  logic [NDOM-1:0]        clk,
  input  logic [NDOM-1:0]        rst_n,
  input  logic [NDOM-1:0][W-1:0] mis,
  output logic [NDOM-1:0]        disagree,
  output logic [NDOM-1:0]        fail
);

  logic [NDOM-1:0][W-1:0] mis_v;
  logic [NDOM-1:0]        dis_v, fail_v;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    tmr_voter #(.W(W)) u_vote_mis (
      .a(mis[0]), .b(mis[1]), .c(mis[2]), .y(mis_v[d])
    );
    tmr_voter #(.W(2)) u_vote_flags (
      .a({disagree[0], fail[0]}),
      .b({disagree[1], fail[1]}),
      .c({disagree[2], fail[2]}),
      .y({dis_v[d], fail_v[d]})
    );

    logic dis_q, fail_q;

    always_ff @(posedge clk[d]) begin
      if (!rst_n[d]) begin
        dis_q  <= 1'b0;
        fail_q <= 1'b0;
      end else begin
        dis_q  <= |mis_v[d];
        fail_q <= fail_v[d] | dis_v[d];
      end
    end

    assign disagree[d] = dis_q;
    assign fail[d]     = fail_q;
  end

endmodule
