// mem_port_pipe: pipeline registers on one ap_memory port of a memory
// channel.
//
// When a task and the memory core it uses sit in different slots of the
// device, every signal of the port is cut by STAGES registers: address,
// data_out, en and we travel STAGES cycles to the core and the read data
// travels STAGES cycles back. Writes still happen, STAGES cycles later. A
// read returns its word 1 + 2*STAGES cycles after it was issued instead of
// 1, so the task on this side must be compiled for that read latency. In the
// buffer channel this pipe sits between the producer task and the memory
// module, which is placed next to the consumer, because producers seldom
// read. This is the published scheme; register reset values are this
// implementation's choice (en and we reset to 0, data is not reset).
//
// Ports: t_* faces the task, m_* the memory core. STAGES = 0 is a plain
// connection.
module mem_port_pipe #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned AW     = 10,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  // task side
  input  logic [AW-1:0]    t_addr,
  input  logic             t_ce,
  input  logic             t_we,
  input  logic [WIDTH-1:0] t_din,
  output logic [WIDTH-1:0] t_qout,
  // memory side
  output logic [AW-1:0]    m_addr,
  output logic             m_ce,
  output logic             m_we,
  output logic [WIDTH-1:0] m_din,
  input  logic [WIDTH-1:0] m_qout
);
  if (STAGES == 0) begin : g_wire
    assign m_addr = t_addr;
    assign m_ce   = t_ce;
    assign m_we   = t_we;
    assign m_din  = t_din;
    assign t_qout = m_qout;
  end else begin : g_regs
    logic [AW-1:0]    addr_q [STAGES];
    logic [WIDTH-1:0] din_q  [STAGES];
    logic [WIDTH-1:0] qout_q [STAGES];
    logic             ce_q   [STAGES];
    logic             we_q   [STAGES];

    always_ff @(posedge clk) begin
      addr_q[0] <= t_addr;
      din_q[0]  <= t_din;
      qout_q[0] <= m_qout;
      for (int i = 1; i < STAGES; i++) begin
        addr_q[i] <= addr_q[i-1];
        din_q[i]  <= din_q[i-1];
        qout_q[i] <= qout_q[i-1];
      end
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < STAGES; i++) begin
          ce_q[i] <= 1'b0;
          we_q[i] <= 1'b0;
        end
      end else begin
        ce_q[0] <= t_ce;
        we_q[0] <= t_we;
        for (int i = 1; i < STAGES; i++) begin
          ce_q[i] <= ce_q[i-1];
          we_q[i] <= we_q[i-1];
        end
      end
    end

    assign m_addr = addr_q[STAGES-1];
    assign m_din  = din_q[STAGES-1];
    assign m_ce   = ce_q[STAGES-1];
    assign m_we   = we_q[STAGES-1];
    assign t_qout = qout_q[STAGES-1];
  end

endmodule
