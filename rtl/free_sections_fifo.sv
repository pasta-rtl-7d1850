// free_sections_fifo: the buffer channel FIFO that holds the tokens of the
// sections no task is using, and that fills itself with every token after
// reset.
//
// It has three parts, as in the published design: the FIFO itself (an
// srl_fifo), a two-state FSM with the initialisation logic, and a relay that
// decides who drives the FIFO.
//   RESET: entered on reset. The FSM writes the tokens 0, 1, ... SECTIONS-1
//          into the FIFO, one per cycle. Meanwhile the relay hides the FIFO:
//          the producer side sees empty = 1 (so it does not read) and the
//          consumer side sees full = 1 (so it does not write).
//   DONE:  entered after the last token is written. The relay connects the
//          FIFO straight to the outside ports.
// Initialisation takes SECTIONS cycles after reset is released; the first
// token can be read in the cycle after that. Tokens are never written again
// until the next reset, so the channel can be run many times.
//
// Ports: the read side (dout, read, empty) faces the producer task, which
// takes a free section from here; the write side (din, write, full) faces the
// consumer task, which returns a section after reading it. Same timing as
// srl_fifo. HEADROOM is passed to the FIFO for a pipelined write side.
// The FIFO depth equal to the number of sections, the one-token-per-cycle
// fill and the token numbering are this implementation's choices.
module free_sections_fifo
  import pasta_pkg::*;
#(
  parameter int unsigned SECTIONS = 2,
  parameter int unsigned DEPTH    = SECTIONS,
  parameter int unsigned HEADROOM = 0,
  localparam int unsigned TW      = token_width(SECTIONS)
) (
  input  logic          clk,
  input  logic          rst,
  // producer side: take a free section
  output logic [TW-1:0] dout,
  input  logic          read,
  output logic          empty,
  // consumer side: return a section
  input  logic [TW-1:0] din,
  input  logic          write,
  output logic          full
);
  typedef enum logic {ST_RESET, ST_DONE} init_state_e;

  init_state_e   state;
  logic [TW-1:0] next_token;

  // internal FIFO ports
  logic [TW-1:0] f_din, f_dout;
  logic          f_write, f_read, f_full, f_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= ST_RESET;
      next_token <= '0;
    end else if (state == ST_RESET && !f_full) begin
      next_token <= next_token + 1'b1;
      if (next_token == TW'(SECTIONS - 1)) state <= ST_DONE;
    end
  end

  // relay
  always_comb begin
    if (state == ST_RESET) begin
      f_din   = next_token;
      f_write = !f_full;
      f_read  = 1'b0;
      empty   = 1'b1;
      full    = 1'b1;
    end else begin
      f_din   = din;
      f_write = write;
      f_read  = read;
      empty   = f_empty;
      full    = f_full;
    end
  end
  assign dout = f_dout;

  srl_fifo #(.WIDTH(TW), .DEPTH(DEPTH), .HEADROOM(HEADROOM)) u_fifo (
    .clk, .rst,
    .din(f_din), .write(f_write), .full(f_full),
    .dout(f_dout), .read(f_read), .empty(f_empty)
  );

  initial begin
    if (DEPTH < SECTIONS) $error("free_sections_fifo: DEPTH must hold every token");
  end

endmodule
