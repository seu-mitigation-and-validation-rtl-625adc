// Shared types and constants of the TMR dual-LEON3 test system.
//
// The system holds three TMR domains (copies 0, 1 and 2 of every register and
// memory) and two processor systems (core 1 and core 2) that run the same
// program so that their bus traffic can be compared cycle by cycle.
//
// The AHB structures carry the AMBA 2.0 AHB signals a slave sees and drives.
// cmp_bus_t is the 104-bit bundle of processor bus signals that the test
// harness compares between the two cores. The count of 104 follows the
// design; which signals make up the 104 bits is this design's choice: the
// master's request, lock, transfer type, address, direction, size and write
// data, and the read data returned to it (1+1+2+32+1+3+32+32 = 104).
package leon3_tmr_pkg;

  localparam int unsigned NDOM     = 3;    // TMR domains
  localparam int unsigned NCORE    = 2;    // processors under test
  localparam int unsigned CMP_BITS = 104;  // compared bus bits per core

  // AHB transfer types (AMBA 2.0)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // AHB response codes (AMBA 2.0)
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Signals into one AHB slave (what the bus controller routes to it).
  typedef struct packed {
    logic        hsel;
    logic [31:0] haddr;
    logic        hwrite;
    logic [1:0]  htrans;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
    logic        hready;   // bus-wide HREADY: previous transfer completes
  } ahb_slv_in_t;

  // Signals out of one AHB slave.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    logic [1:0]  hresp;
  } ahb_slv_out_t;

  // Processor bus signals compared between the two cores (104 bits).
  typedef struct packed {
    logic        hbusreq;
    logic        hlock;
    logic [1:0]  htrans;
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
    logic [31:0] hrdata;
  } cmp_bus_t;

  // Status brought out of the chip (physical I/O and JTAG register).
  typedef struct packed {
    logic [NDOM-1:0] act_core2;  // activity of core 2, per domain
    logic [NDOM-1:0] act_core1;  // activity of core 1, per domain
    logic [NDOM-1:0] fail;       // sticky failure (caught disagreement)
    logic [NDOM-1:0] disagree;   // cores disagree in this cycle
    logic [NDOM-1:0] hb_dom;     // heartbeat of each domain clock
    logic            hb_global;  // heartbeat of the global clock
  } status_t;

  localparam int unsigned STATUS_BITS = $bits(status_t);

  // Bitwise two-out-of-three majority.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
