// Activity monitor of one processor under test.
//
// Shows that the bus signals being compared keep changing, i.e. that the
// processor is running: a processor that has stopped would also agree with
// its twin if both stopped. In each TMR domain d the three copies of the
// core's W-bit bus are voted, the voted bus is compared with its value one
// clock earlier, and a change reloads a hold counter of ACT_WIN cycles.
// act[d] is high while that counter runs, i.e. when the bus changed within
// the last ACT_WIN clocks.
//
// Interface: per-domain clock and synchronous active-low reset, the core's
// three bus copies, and the three activity bits. Latency: act rises one clock
// after the first change and falls ACT_WIN clocks after the last one.
//
// Triplicated activity flags per core follow the published harness; how
// activity is detected and the 256-clock window are this design's choices.
module activity_mon #(
  parameter int unsigned W       = 104,
  parameter int unsigned ACT_WIN = 256,
  localparam int unsigned NDOM   = 3,
  localparam int unsigned CW     = $clog2(ACT_WIN + 1)
) (
  input  logic [NDOM-1:0]        clk,
  input  logic [NDOM-1:0]        rst_n,
  input  logic [NDOM-1:0][W-1:0] bus,
  output logic [NDOM-1:0]        act
);

  logic [NDOM-1:0][W-1:0]  bus_v;

  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    tmr_voter #(.W(W)) u_vote_bus (
      .a(bus[0]), .b(bus[1]), .c(bus[2]), .y(bus_v[d])
    );

    logic [W-1:0]  prev_q;
    logic [CW-1:0] cnt_q;

    always_ff @(posedge clk[d]) begin
      if (!rst_n[d]) begin
        prev_q <= '0;
        cnt_q  <= '0;
      end else begin
        prev_q <= bus_v[d];
        if (bus_v[d] != prev_q) cnt_q <= CW'(ACT_WIN);
        else if (cnt_q != '0)   cnt_q <= cnt_q - 1'b1;
      end
    end

    assign act[d] = (cnt_q != '0);
  end

endmodule
