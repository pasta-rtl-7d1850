// fifo_write_pipe: pipeline registers on the write side of a FIFO channel.
//
// When a FIFO channel crosses a slot boundary of the device, its write side
// is cut by STAGES register stages: 'write' and 'data' travel STAGES cycles
// forward from the writing task to the FIFO, and 'full' travels STAGES
// cycles back. The writer therefore learns late that the FIFO is full and
// may write up to 2*STAGES more words after the FIFO reached its depth. The
// FIFO behind this pipe must absorb them: build it with HEADROOM =
// 2*STAGES (see srl_fifo), so it still raises full at its original depth
// but has room for the words in flight. That is the published scheme for
// pipelining a FIFO channel; the exact headroom bound is worked out here.
//
// Ports: the u_* side faces the writing task, the f_* side the FIFO.
// STAGES = 0 is a plain connection. The 'full' registers reset to 1, so the
// writer holds off until the FIFO's real state has reached it; the 'write'
// registers reset to 0. Both reset values are this implementation's choice.
module fifo_write_pipe #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  // writing task side
  input  logic [WIDTH-1:0] u_din,
  input  logic             u_write,
  output logic             u_full,
  // FIFO side
  output logic [WIDTH-1:0] f_din,
  output logic             f_write,
  input  logic             f_full
);
  if (STAGES == 0) begin : g_wire
    assign f_din   = u_din;
    assign f_write = u_write;
    assign u_full  = f_full;
  end else begin : g_regs
    logic [WIDTH-1:0] data_q  [STAGES];
    logic             write_q [STAGES];
    logic             full_q  [STAGES];

    always_ff @(posedge clk) begin
      data_q[0] <= u_din;
      for (int i = 1; i < STAGES; i++) data_q[i] <= data_q[i-1];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < STAGES; i++) begin
          write_q[i] <= 1'b0;
          full_q[i]  <= 1'b1;
        end
      end else begin
        write_q[0] <= u_write;
        full_q[0]  <= f_full;
        for (int i = 1; i < STAGES; i++) begin
          write_q[i] <= write_q[i-1];
          full_q[i]  <= full_q[i-1];
        end
      end
    end

    assign f_din   = data_q[STAGES-1];
    assign f_write = write_q[STAGES-1];
    assign u_full  = full_q[STAGES-1];
  end

endmodule
