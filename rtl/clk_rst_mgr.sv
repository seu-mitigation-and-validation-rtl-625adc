// Clock and reset manager of the dual-processor test system.
//
// The 200 MHz board clock is divided by CLK_DIV (4) into the 50 MHz system
// clock, once per TMR domain, so each domain runs on a clock of its own. Each
// divider is a counter whose state is voted across the three dividers before
// it is incremented, so an upset counter falls back into step on the next
// input clock edge; the domain clock is the counter's top bit, taken straight
// from a flip-flop. In an FPGA each domain clock then drives its own global
// clock buffer.
//
// Each domain gets its own reset: the external active-low reset passed
// through a two-stage synchronizer clocked by that domain's clock (assertion
// and release both take two domain clock edges).
//
// Heartbeats for the status outputs: hb_global is the top bit of a counter on
// the 200 MHz clock, hb_dom[d] the top bit of a counter on domain clock d.
// The global counter has log2(CLK_DIV) more bits, so all heartbeats toggle at
// the same rate: every 2**(HB_BITS-1) system clock cycles.
//
// The divide-by-four and one clock per domain follow the published design;
// the voted dividers, the reset synchroniser and the heartbeat rate are this
// design's choices.
module clk_rst_mgr #(
  parameter int unsigned CLK_DIV = 4,
  parameter int unsigned HB_BITS = 24,
  localparam int unsigned NDOM   = 3,
  localparam int unsigned DB     = $clog2(CLK_DIV),
  localparam int unsigned GB     = HB_BITS + DB
) (
  input  logic            clk_in,     // 200 MHz board clock
  input  logic            rst_in_n,   // external reset, active low
  output logic [NDOM-1:0] clk_dom,    // 50 MHz domain clocks
  output logic [NDOM-1:0] rst_n_dom,  // synchronous domain resets, active low
  output logic            hb_global,
  output logic [NDOM-1:0] hb_dom
);

  logic [NDOM-1:0][DB-1:0]      div_q, div_v;
  logic [GB-1:0]                hb_gcnt;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    tmr_voter #(.W(DB)) u_vote_div (
      .a(div_q[0]), .b(div_q[1]), .c(div_q[2]), .y(div_v[d])
    );

    always_ff @(posedge clk_in) div_q[d] <= div_v[d] + 1'b1;

    assign clk_dom[d] = div_q[d][DB-1];

    logic [1:0]         rst_sync;
    logic [HB_BITS-1:0] hb_cnt;

    always_ff @(posedge clk_dom[d]) rst_sync <= {rst_sync[0], rst_in_n};

    assign rst_n_dom[d] = rst_sync[1];

    always_ff @(posedge clk_dom[d]) begin
      if (!rst_n_dom[d]) hb_cnt <= '0;
      else               hb_cnt <= hb_cnt + 1'b1;
    end

    assign hb_dom[d] = hb_cnt[HB_BITS-1];
  end

  always_ff @(posedge clk_in) begin
    if (!rst_in_n) hb_gcnt <= '0;
    else           hb_gcnt <= hb_gcnt + 1'b1;
  end

  assign hb_global = hb_gcnt[GB-1];

endmodule
