// Behavioural model of a processor's AHB master side, for testbenches.
//
// Stands in for a LEON3 core together with its AHB controller: it issues a
// queued list of single transfers (byte, halfword or word, read or write) in
// the usual pipelined way, one address phase overlapping the previous data
// phase, and follows HREADY for wait states. Two slaves are decoded as the
// boot ROM (address bits 31:28 = 0) and the RAM (address bits 31:28 = 4);
// HREADY and HRDATA are taken from the slave in the data phase. A reference
// copy of both memories (word-addressed, big-endian byte lanes) checks every
// read. bus shows the 104 compared bus signals as the processor sees them.
//
// Use: preload() the reference for the ROM, push() transfers, run().
// checks/failures/stalls/rom_reads/ram_reads/ram_writes count what happened.
module ahb_master_bfm
  import leon3_tmr_pkg::*;
(
  input  logic         clk,
  output ahb_slv_in_t  rom_i,
  input  ahb_slv_out_t rom_o,
  output ahb_slv_in_t  ram_i,
  input  ahb_slv_out_t ram_o,
  output cmp_bus_t     bus
);
  timeunit 1ns; timeprecision 1ps;

  typedef struct {
    bit          write;
    logic [31:0] addr;
    logic [2:0]  size;
    logic [31:0] data;
  } op_t;

  op_t         q[$];
  logic [31:0] ref_mem [logic [31:0]];
  int          checks, failures, stalls, rom_reads, ram_reads, ram_writes, cycles;

  // address-phase drive, and the slave owning the data phase
  logic        a_valid, a_write;
  logic [31:0] a_addr, d_wdata;
  logic [2:0]  a_size;
  logic        d_is_ram;
  logic        hready, a_is_ram;
  logic [31:0] hrdata;

  initial begin
    a_valid = 0; a_write = 0; a_addr = '0; a_size = 3'd2; d_wdata = '0;
    d_is_ram = 0;
    checks = 0; failures = 0; stalls = 0; rom_reads = 0; ram_reads = 0;
    ram_writes = 0; cycles = 0;
  end

  assign a_is_ram = (a_addr[31:28] == 4'h4);
  assign hready   = d_is_ram ? ram_o.hready : rom_o.hready;
  assign hrdata   = d_is_ram ? ram_o.hrdata : rom_o.hrdata;

  always_comb begin
    rom_i.hsel   = a_valid && !a_is_ram;
    ram_i.hsel   = a_valid && a_is_ram;
    rom_i.haddr  = a_addr;               ram_i.haddr  = a_addr;
    rom_i.hwrite = a_write;              ram_i.hwrite = a_write;
    rom_i.htrans = a_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
    ram_i.htrans = a_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
    rom_i.hsize  = a_size;               ram_i.hsize  = a_size;
    rom_i.hwdata = d_wdata;              ram_i.hwdata = d_wdata;
    rom_i.hready = hready;               ram_i.hready = hready;
    bus.hbusreq  = a_valid;
    bus.hlock    = 1'b0;
    bus.htrans   = a_valid ? HTRANS_NONSEQ : HTRANS_IDLE;
    bus.haddr    = a_addr;
    bus.hwrite   = a_write;
    bus.hsize    = a_size;
    bus.hwdata   = d_wdata;
    bus.hrdata   = hrdata;
  end

  function automatic logic [3:0] lanes(logic [31:0] addr, logic [2:0] size);
    case (size)
      3'd0:    return 4'b1000 >> addr[1:0];
      3'd1:    return addr[1] ? 4'b0011 : 4'b1100;
      default: return 4'b1111;
    endcase
  endfunction

  function automatic logic [31:0] ref_read(logic [31:0] addr);
    logic [31:0] wa = {addr[31:2], 2'b00};
    return ref_mem.exists(wa) ? ref_mem[wa] : 32'h0;
  endfunction

  function automatic void preload(logic [31:0] addr, logic [31:0] data);
    ref_mem[{addr[31:2], 2'b00}] = data;
  endfunction

  function automatic void push(bit write, logic [31:0] addr, logic [2:0] size,
                               logic [31:0] data);
    op_t o;
    o.write = write; o.addr = addr; o.size = size; o.data = data;
    q.push_back(o);
  endfunction

  task automatic run();
    op_t dp, ap;
    bit  dp_v = 0, ap_v, rdy;
    int  i = 0;
    while (i < q.size() || dp_v) begin
      @(negedge clk);
      ap_v = (i < q.size());
      if (ap_v) ap = q[i];
      a_valid = ap_v;
      a_addr  = ap_v ? ap.addr : 32'h0;
      a_write = ap_v && ap.write;
      a_size  = ap_v ? ap.size : 3'd2;
      d_wdata = (dp_v && dp.write) ? dp.data : 32'h0;
      #1;
      rdy = hready;
      if (dp_v && rdy) begin
        if (dp.write) begin
          logic [31:0] w = ref_read(dp.addr);
          logic [3:0]  l = lanes(dp.addr, dp.size);
          for (int b = 0; b < 4; b++) if (l[b]) w[8*b +: 8] = dp.data[8*b +: 8];
          if (dp.addr[31:28] == 4'h4) begin
            ref_mem[{dp.addr[31:2], 2'b00}] = w;
            ram_writes++;
          end
        end else begin
          checks++;
          if (dp.addr[31:28] == 4'h4) ram_reads++; else rom_reads++;
          if (hrdata !== ref_read(dp.addr)) begin
            failures++;
            $display("bfm %m: read %h got %h expected %h", dp.addr, hrdata,
                     ref_read(dp.addr));
          end
        end
      end
      if (!rdy) stalls++;
      cycles++;
      @(posedge clk);
      if (rdy) begin
        dp_v = ap_v;
        dp   = ap;
        if (ap_v) i++;
        d_is_ram = ap_v && (ap.addr[31:28] == 4'h4);
      end
    end
    @(negedge clk);
    a_valid = 0; a_write = 0; d_wdata = '0;
    q.delete();
  endtask

endmodule
