// mem_core_t2p: true dual-port (T2P) memory core template, block RAM or
// UltraRAM.
//
// One logical memory core of a buffer channel when a task on either side
// both reads and writes it. Port A faces the producer task and port B the
// consumer task; each can read or write one word per cycle. CORE selects the
// physical resource the synthesis tool is asked to use (UltraRAM has no
// simple dual-port mode, so it only exists here).
//
// Interface (ap_memory style, one clock, no reset on the array), per port X:
//   addr_x, ce_x, we_x, din_x, qout_x. With ce_x high at a clock edge the
//   port writes din_x if we_x is high and otherwise reads; a read word
//   appears on qout_x one cycle later (read latency 1) and is held until the
//   port's next read. A write does not change qout_x.
// Two writes to the same address in one cycle are not allowed (assertion);
// a read of an address written in the same cycle returns the old word.
// CASCADE_HEIGHT caps how many physical RAMs the synthesis tool may chain
// for depth; it is a synthesis attribute with no effect in simulation. Its
// default of 16 follows the published templates, and 1 means no cascading.
// The read and write order within a cycle is this implementation's choice.
module mem_core_t2p
  import pasta_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 800,
  parameter int unsigned CASCADE_HEIGHT = 16,
  parameter core_type_e  CORE  = CORE_BRAM,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  // port A
  input  logic [AW-1:0]    addr_a,
  input  logic             ce_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] qout_a,
  // port B
  input  logic [AW-1:0]    addr_b,
  input  logic             ce_b,
  input  logic             we_b,
  input  logic [WIDTH-1:0] din_b,
  output logic [WIDTH-1:0] qout_b
);
  initial begin
    if (CASCADE_HEIGHT < 1)
      $error("mem_core_t2p: CASCADE_HEIGHT must be at least 1 (1 = no cascading)");
  end

  if (CORE == CORE_URAM) begin : g_uram
    (* ram_style = "ultra", cascade_height = CASCADE_HEIGHT *)
    logic [WIDTH-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (ce_a && !we_a) qout_a <= mem[addr_a];
      if (ce_b && !we_b) qout_b <= mem[addr_b];
      if (ce_a && we_a)  mem[addr_a] <= din_a;
      if (ce_b && we_b)  mem[addr_b] <= din_b;
    end
  end else begin : g_bram
    (* ram_style = "block", cascade_height = CASCADE_HEIGHT *)
    logic [WIDTH-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (ce_a && !we_a) qout_a <= mem[addr_a];
      if (ce_b && !we_b) qout_b <= mem[addr_b];
      if (ce_a && we_a)  mem[addr_a] <= din_a;
      if (ce_b && we_b)  mem[addr_b] <= din_b;
    end
  end

  a_addr_a: assert property (@(posedge clk) ce_a |-> 32'(addr_a) < DEPTH)
    else $error("mem_core_t2p: port A address out of range");
  a_addr_b: assert property (@(posedge clk) ce_b |-> 32'(addr_b) < DEPTH)
    else $error("mem_core_t2p: port B address out of range");
  a_no_write_clash: assert property (@(posedge clk)
      !(ce_a && we_a && ce_b && we_b && addr_a == addr_b))
    else $error("mem_core_t2p: both ports write the same address");

endmodule
