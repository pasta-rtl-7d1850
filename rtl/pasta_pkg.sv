// pasta_pkg: types and elaboration-time arithmetic shared by the buffer
// channel modules.
//
// A buffer channel is declared with an element width, a shape of up to
// MAX_DIMS dimensions, a number of sections (2 = ping-pong), one
// partitioning scheme per dimension and a memory core type. From those the
// memory module generator derives how many logical dual-port cores it needs
// (c = product of the per-dimension partition factors f(i)) and how deep each
// core is (d_p = s * product(d_i / f_i)). The scheme names and the two
// formulas follow the published buffer channel design; the limit of three
// dimensions, the rounding up of d_i / f_i for factors that do not divide a
// dimension, and the token width rule are this implementation's choices.
package pasta_pkg;

  // Array partitioning scheme of one buffer dimension (same meaning as the
  // array_partition pragma of common HLS tools).
  typedef enum logic [1:0] {
    PART_NORMAL   = 2'd0,  // no partitioning, f(i) = 1
    PART_COMPLETE = 2'd1,  // one core per element of the dimension, f(i) = d_i
    PART_CYCLIC   = 2'd2,  // f(i) = cyclic factor
    PART_BLOCK    = 2'd3   // f(i) = block factor
  } part_scheme_e;

  // Physical resource a logical memory core is mapped to.
  typedef enum logic {
    CORE_BRAM = 1'b0,
    CORE_URAM = 1'b1
  } core_type_e;

  // Port style of the memory cores. S2P: producer side write-only, consumer
  // side read-only. T2P: both sides may read or write.
  typedef enum logic {
    PORTS_S2P = 1'b0,
    PORTS_T2P = 1'b1
  } core_ports_e;

  // Largest number of buffer dimensions the generator accepts.
  localparam int unsigned MAX_DIMS = 3;

  typedef int unsigned       dims_t  [MAX_DIMS];
  typedef part_scheme_e      parts_t [MAX_DIMS];

  // Partition factor f(i) of one dimension, equation (1).
  function automatic int unsigned part_factor(input part_scheme_e scheme,
                                              input int unsigned  dim,
                                              input int unsigned  factor);
    unique case (scheme)
      PART_NORMAL:   return 1;
      PART_COMPLETE: return dim;
      default:       return (factor == 0) ? 1 : factor;
    endcase
  endfunction

  // Number of logical memory cores c = prod f(i).
  function automatic int unsigned num_cores(input dims_t dims, input parts_t schemes,
                                            input dims_t factors);
    int unsigned c = 1;
    for (int i = 0; i < MAX_DIMS; i++) c *= part_factor(schemes[i], dims[i], factors[i]);
    return c;
  endfunction

  // Depth of every logical core d_p = s * prod(d_i / f_i), equation (2).
  function automatic int unsigned core_depth(input dims_t dims, input parts_t schemes,
                                             input dims_t factors, input int unsigned sections);
    int unsigned d = sections;
    int unsigned f;
    for (int i = 0; i < MAX_DIMS; i++) begin
      f = part_factor(schemes[i], dims[i], factors[i]);
      d *= (dims[i] + f - 1) / f;
    end
    return d;
  endfunction

  // Width of a section token: enough bits to number every section, at least 1.
  function automatic int unsigned token_width(input int unsigned sections);
    return (sections <= 2) ? 1 : $clog2(sections);
  endfunction

endpackage
