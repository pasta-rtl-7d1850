// mem_core_s2p: simple dual-port (S2P) memory core template for block RAM.
//
// One logical memory core of a buffer channel when the producer task only
// writes and the consumer task only reads. Port A, on the producer side, is
// write-only; port B, on the consumer side, is read-only. A simple dual-port
// block RAM may be twice as wide as a true dual-port one, which is why this
// template exists next to mem_core_t2p.
//
// Interface (ap_memory style, one clock, no reset on the array):
//   port A: addr_a, ce_a, we_a, din_a   - a write happens at the clock edge
//           where ce_a and we_a are both high.
//   port B: addr_b, ce_b, qout_b         - qout_b holds the word at addr_b one
//           cycle after the edge where ce_b was high (read latency 1), and
//           keeps it until the next read.
// A read of the address being written in the same cycle returns the old word.
// Any width and depth are accepted; the synthesis tool splits the array into
// physical block RAMs. CASCADE_HEIGHT caps how many of them the tool may
// chain for depth; it is handed over as a synthesis attribute and has no
// effect in simulation. Its default of 16 follows the published templates,
// and 1 means no cascading. The read-before-write order is this
// implementation's choice.
module mem_core_s2p #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 800,
  parameter int unsigned CASCADE_HEIGHT = 16,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: write
  input  logic [AW-1:0]    addr_a,
  input  logic             ce_a,
  input  logic             we_a,
  input  logic [WIDTH-1:0] din_a,
  // port B: read
  input  logic [AW-1:0]    addr_b,
  input  logic             ce_b,
  output logic [WIDTH-1:0] qout_b
);
  (* ram_style = "block", cascade_height = CASCADE_HEIGHT *)
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (CASCADE_HEIGHT < 1)
      $error("mem_core_s2p: CASCADE_HEIGHT must be at least 1 (1 = no cascading)");
  end

  always_ff @(posedge clk) begin
    if (ce_a && we_a) mem[addr_a] <= din_a;
    if (ce_b)         qout_b      <= mem[addr_b];
  end

  a_addr_a: assert property (@(posedge clk) ce_a |-> 32'(addr_a) < DEPTH)
    else $error("mem_core_s2p: port A address out of range");
  a_addr_b: assert property (@(posedge clk) ce_b |-> 32'(addr_b) < DEPTH)
    else $error("mem_core_s2p: port B address out of range");

endmodule
