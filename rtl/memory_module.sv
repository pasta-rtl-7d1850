// memory_module: the partitioned, sectioned memory of a buffer channel.
//
// The module holds NUM_CORES logical dual-port memory cores, all WIDTH bits
// wide and CORE_DEPTH words deep. Both numbers come from the buffer's
// declaration through the formulas in pasta_pkg: one core per partition of
// the array (c = prod f(i)) and, in each core, SECTIONS copies of that
// partition's share of the array (d_p = s * prod(d_i / f_i)). Every core has
// one ap_memory port on the producer side (p_*) and one on the consumer side
// (c_*), so both tasks can reach every partition in the same cycle. Which
// element lives in which core, and at which address, is decided by the tasks
// (as the HLS tool does for a partitioned array); the section a task owns is
// part of the address it drives.
//
// PORTS picks the core template: PORTS_S2P uses mem_core_s2p (producer side
// write-only, consumer side read-only; p_qout then reads as zero and the
// consumer's we and din are ignored), PORTS_T2P uses mem_core_t2p on CORE (block RAM
// or UltraRAM). UltraRAM with S2P is rejected at elaboration, as UltraRAM has
// no simple dual-port mode. CASCADE_HEIGHT is handed to every core as the
// synthesis limit on chained physical RAMs (published default 16).
//
// Timing: a write takes effect at the clock edge where ce and we are high; a
// read returns its word on qout one cycle after the edge where ce was high.
// The default configuration is the 20 x 40 float, two-section buffer of the
// published usage example, with the second dimension partitioned cyclically;
// the factor 2 is this implementation's choice, as is the three-dimension
// limit of the generator.
module memory_module
  import pasta_pkg::*;
#(
  parameter int unsigned WIDTH    = 32,
  parameter dims_t       DIMS     = '{20, 40, 1},
  parameter parts_t      SCHEMES  = '{PART_NORMAL, PART_CYCLIC, PART_NORMAL},
  parameter dims_t       FACTORS  = '{1, 2, 1},
  parameter int unsigned SECTIONS = 2,
  parameter core_type_e  CORE     = CORE_BRAM,
  parameter core_ports_e PORTS    = PORTS_S2P,
  parameter int unsigned CASCADE_HEIGHT = 16,
  localparam int unsigned NUM_CORES  = num_cores(DIMS, SCHEMES, FACTORS),
  localparam int unsigned CORE_DEPTH = core_depth(DIMS, SCHEMES, FACTORS, SECTIONS),
  localparam int unsigned AW         = (CORE_DEPTH <= 2) ? 1 : $clog2(CORE_DEPTH)
) (
  input  logic             clk,
  // producer side, one ap_memory port per core
  input  logic [AW-1:0]    p_addr [NUM_CORES],
  input  logic             p_ce   [NUM_CORES],
  input  logic             p_we   [NUM_CORES],
  input  logic [WIDTH-1:0] p_din  [NUM_CORES],
  output logic [WIDTH-1:0] p_qout [NUM_CORES],
  // consumer side, one ap_memory port per core
  input  logic [AW-1:0]    c_addr [NUM_CORES],
  input  logic             c_ce   [NUM_CORES],
  input  logic             c_we   [NUM_CORES],
  input  logic [WIDTH-1:0] c_din  [NUM_CORES],
  output logic [WIDTH-1:0] c_qout [NUM_CORES]
);
  initial begin
    if (CORE == CORE_URAM && PORTS == PORTS_S2P)
      $error("memory_module: UltraRAM cores support only true dual-port (T2P)");
  end

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_core
    if (PORTS == PORTS_S2P) begin : g_s2p
      mem_core_s2p #(.WIDTH(WIDTH), .DEPTH(CORE_DEPTH), .CASCADE_HEIGHT(CASCADE_HEIGHT)) u_core (
        .clk,
        .addr_a(p_addr[k]), .ce_a(p_ce[k]), .we_a(p_we[k]), .din_a(p_din[k]),
        .addr_b(c_addr[k]), .ce_b(c_ce[k] && !c_we[k]), .qout_b(c_qout[k])
      );
      assign p_qout[k] = '0;
    end else begin : g_t2p
      mem_core_t2p #(.WIDTH(WIDTH), .DEPTH(CORE_DEPTH), .CORE(CORE),
                     .CASCADE_HEIGHT(CASCADE_HEIGHT)) u_core (
        .clk,
        .addr_a(p_addr[k]), .ce_a(p_ce[k]), .we_a(p_we[k]), .din_a(p_din[k]), .qout_a(p_qout[k]),
        .addr_b(c_addr[k]), .ce_b(c_ce[k]), .we_b(c_we[k]), .din_b(c_din[k]), .qout_b(c_qout[k])
      );
    end
  end

endmodule
