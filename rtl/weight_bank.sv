// weight_bank: adaptive weight registers with the DCMA update.
//
// Holds the N complex weights (BW-bit two's-complement Q1.(BW-1)). On load
// every weight is set to W_INIT_RE + j W_INIT_IM. On upd each weight takes
//   w_i <- sat( w_i - 2^-SH * g_i )
// where g_i is the gradient term from the error-forward path (2*BW-2
// fraction bits). The step size 4*mu and the post-scaling 2^-s3 are
// powers of two and are folded into the single arithmetic right shift SH,
// as the document replaces the step-size multiplication by a shift. The
// difference is formed at full precision and saturated/truncated to BW
// bits. load has priority over upd. One clock of latency; the weight
// registers are the only recursive loop of the processor.
module weight_bank #(
  parameter int unsigned N         = 4,
  parameter int unsigned BW        = 12,
  parameter int unsigned SH        = 10,
  parameter int          W_INIT_RE = 1 << (BW - 3),   // 0.25
  parameter int          W_INIT_IM = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic                   upd,
  input  logic signed [2*BW-1:0] g_re [N],
  input  logic signed [2*BW-1:0] g_im [N],
  output logic signed [BW-1:0]   w_re [N],
  output logic signed [BW-1:0]   w_im [N]
);
  localparam int unsigned DW = 2*BW + 1;   // difference width, 2*BW-2 fraction bits

  for (genvar i = 0; i < int'(N); i++) begin : g_w
    logic signed [DW-1:0] d_re, d_im;
    logic signed [BW-1:0] n_re, n_im;
    logic                 o_re, o_im;

    assign d_re = (DW'(w_re[i]) <<< (BW - 1)) - (DW'(g_re[i]) >>> SH);
    assign d_im = (DW'(w_im[i]) <<< (BW - 1)) - (DW'(g_im[i]) >>> SH);

    sat_trunc #(.IN_W(DW), .IN_FRAC(2*BW - 2), .OUT_W(BW)) u_sat_re (
      .din(d_re), .dout(n_re), .ovf(o_re)
    );
    sat_trunc #(.IN_W(DW), .IN_FRAC(2*BW - 2), .OUT_W(BW)) u_sat_im (
      .din(d_im), .dout(n_im), .ovf(o_im)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w_re[i] <= BW'(W_INIT_RE);
        w_im[i] <= BW'(W_INIT_IM);
      end else if (load) begin
        w_re[i] <= BW'(W_INIT_RE);
        w_im[i] <= BW'(W_INIT_IM);
      end else if (upd) begin
        w_re[i] <= n_re;
        w_im[i] <= n_im;
      end
    end
  end
endmodule
