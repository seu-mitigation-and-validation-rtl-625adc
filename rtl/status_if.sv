// JTAG and physical I/O interface of the test system's status.
//
// The status word (heartbeats, disagreement, failure and activity bits, all
// but the global heartbeat in three copies) leaves the chip two ways. It is
// driven on physical I/O pins (pio) for a monitor board, and it can be read
// through the FPGA's JTAG port as a user data register behind a boundary-scan
// primitive. This module is the data register: it connects to the
// primitive's TCK, SEL, CAPTURE, SHIFT, TDI and TDO signals. On a TCK edge
// with SEL and CAPTURE high it loads the status word, synchronised into the
// TCK domain by two flip-flops per bit; with SEL and SHIFT high it shifts one
// bit towards TDO per TCK edge, least significant bit first, taking TDI in at
// the top. The three copies are not voted on chip: the reader votes them.
//
// Interface: status word in (leon3_tmr_pkg::status_t), pio out, BSCAN
// signals. Timing: pio follows the status combinationally; the JTAG copy is
// at most three TCK edges old when captured.
//
// Status on pins and behind a boundary-scan user register follow the
// published harness; the word layout, bit order and synchroniser are this
// design's choices.
module status_if
  import leon3_tmr_pkg::*;
(
  input  status_t                 status,
  output logic [STATUS_BITS-1:0]  pio,
  // boundary-scan user register signals
  input  logic                    tck,
  input  logic                    sel,
  input  logic                    capture,
  input  logic                    shift,
  input  logic                    tdi,
  output logic                    tdo
);

  logic [STATUS_BITS-1:0] sync1_q, sync2_q, sr_q;

  assign pio = status;

  always_ff @(posedge tck) begin
    sync1_q <= status;
    sync2_q <= sync1_q;
    if (sel && capture)    sr_q <= sync2_q;
    else if (sel && shift) sr_q <= {tdi, sr_q[STATUS_BITS-1:1]};
  end

  assign tdo = sr_q[0];

endmodule
