// cpld1_router: front end of the parallel inverse-halftoning datapath. It takes
// K templates per clock and delivers, on each of N s-LUT ports, at most one of
// them tagged with its sequence number.
//
// Four register stages, one per step of the algorithm, so a new group of K
// templates is accepted every clock and appears on the ports 4 clocks later:
//   stage 1  the K templates are registered (t_0..t_{K-1}).
//   stage 2  each template gets its s-LUT number from the XM function
//            (xm_csa_tree) and, in parallel, its sequence number i+1 is
//            appended: tagged = {i+1, t_i}.
//   stage 3  K demultiplexers (slut_demux) steer each tagged template to the
//            column of its s-LUT.
//   stage 4  N priority multiplexers (slut_priority_mux) keep, per s-LUT, the
//            highest-numbered template; the others are dropped.
// Port word layout: [TW-1 -: SEQ_W] sequence number (0 = idle port),
// [P-1:0] template. The per-step partition and the sequence numbers 1..K
// follow the original design; the valid bit, the reset and the choice to register
// after every step are this implementation's. mean_template is treated as a
// static configuration input.
module cpld1_router #(
  parameter int unsigned K = ih_pkg::K_DEF,
  parameter int unsigned N = ih_pkg::N_DEF,
  parameter int unsigned P = ih_pkg::P_DEF,
  localparam int unsigned SEQ_W = ih_pkg::seq_width(K),
  localparam int unsigned TW    = P + SEQ_W,
  localparam int unsigned LOGN  = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [K-1:0][P-1:0]  templates,      // I_0..I_{K-1}
  input  logic [P-1:0]         mean_template,  // m
  output logic                 out_valid,
  output logic [N-1:0][TW-1:0] port_data       // g_0..g_{N-1}
);
  // stage 1: template registers
  logic [K-1:0][P-1:0] t_q;
  // stage 2: tagged templates and their s-LUT numbers
  logic [K-1:0][TW-1:0]   tag_q;
  logic [K-1:0][LOGN-1:0] slut_q;
  // stage 3: demultiplexer outputs, A_i[j]
  logic [K-1:0][N-1:0][TW-1:0] a_q;
  logic [3:0] v_q;

  logic [K-1:0][LOGN-1:0]      slut_d;
  logic [K-1:0][N-1:0][TW-1:0] a_d;
  logic [N-1:0][TW-1:0]        g_d;

  for (genvar i = 0; i < K; i++) begin : g_tmpl
    xm_csa_tree #(.P(P), .N(N)) u_xm (
      .tmpl(t_q[i]), .mean(mean_template), .slut(slut_d[i]));
    slut_demux #(.N(N), .TW(TW)) u_demux (
      .din(tag_q[i]), .sel(slut_q[i]), .dout(a_d[i]));
  end

  for (genvar j = 0; j < N; j++) begin : g_port
    logic [K-1:0][TW-1:0] col;
    always_comb
      for (int i = 0; i < int'(K); i++) col[i] = a_q[i][j];
    slut_priority_mux #(.K(K), .TW(TW), .SEQ_W(SEQ_W)) u_mux (
      .din(col), .dout(g_d[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= '0;
      t_q       <= '0;
      tag_q     <= '0;
      slut_q    <= '0;
      a_q       <= '0;
      port_data <= '0;
    end else begin
      v_q <= {v_q[2:0], in_valid};
      t_q <= in_valid ? templates : '0;
      for (int i = 0; i < int'(K); i++)
        tag_q[i] <= v_q[0] ? {SEQ_W'(i + 1), t_q[i]} : '0;
      slut_q    <= slut_d;
      a_q       <= a_d;
      port_data <= g_d;
    end
  end
  assign out_valid = v_q[3];
endmodule
