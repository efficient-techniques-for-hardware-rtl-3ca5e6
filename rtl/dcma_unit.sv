// dcma_unit: 5D pipelined delayed-CMA adaptive array processing unit.
//
// The constant modulus algorithm adapts the weights w of an N-element array
// so that the output y = w^H x has constant envelope. To run at one sample
// per clock with a one-multiplier critical path, the loop is pipelined and
// the update uses a delayed gradient (delayed CMA):
//   y(k)     = w(k)^H x(k)                       (out two samples later)
//   w(k+1)   = w(k) - 4 mu x(k-5) y*(k-5) (|y(k-5)|^2 - sigma^2)
// The feed-forward path (ffp) has 2 register stages and the error-forward
// path (efp) 3, for 5 in total, as in the document. Between them the full-
// precision output is scaled by 2^-S1 and saturated/truncated to the BW-bit
// multiplier width (ye); its top BO bits are the array output (y_re/y_im)
// and index the squarer tables. x is delayed by two samples so that it
// meets its own y in the error-forward path.
//
// Interface: every register advances only when en is high, so all delays
// count samples. init (or reset) loads the initial weights W_INIT + j0 and
// marks the pipeline empty; y_valid rises with the first output after it,
// and weights are updated (when adapt is high) only with gradients of
// samples taken after init. x is two's complement (POT = 0, fixed-point
// build, BW = 10 in the document) or sign-magnitude power-of-two (POT = 1,
// power-of-two build, BW = 12). MU_SH + S3 is the total right shift of the
// gradient (4 mu 2^-s3 = 2^-(MU_SH+S3)). The widths, arithmetic and latency
// follow the document; the scaling constants, initial weight, enable and
// init handling are this design's choices.
module dcma_unit #(
  parameter int unsigned N         = 4,
  parameter int unsigned BI        = 8,
  parameter int unsigned BO        = 8,
  parameter int unsigned BW        = 12,
  parameter bit          POT       = 1'b1,
  parameter int unsigned MU_SH     = 10,
  parameter int unsigned S1        = 0,
  parameter int unsigned S2        = 0,
  parameter int unsigned S3        = 0,
  parameter int unsigned SIGMA2    = 1 << (2*BO-2),
  parameter int          W_INIT_RE = 1 << (BW - 3)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 en,
  input  logic                 adapt,
  input  logic        [BI-1:0] x_re [N],
  input  logic        [BI-1:0] x_im [N],
  output logic signed [BO-1:0] y_re,
  output logic signed [BO-1:0] y_im,
  output logic                 y_valid,
  output logic signed [BW-1:0] w_re [N],
  output logic signed [BW-1:0] w_im [N]
);
  localparam int unsigned YW = BI + BW + $clog2(N) + 1;
  localparam int unsigned P  = 5;                // total pipeline delay m + n

  // ---------------- feed-forward path ----------------
  logic signed [YW-1:0] yf_re, yf_im;

  ffp #(.N(N), .BI(BI), .BW(BW), .POT(POT)) u_ffp (
    .clk, .rst_n, .en, .x_re, .x_im, .w_re, .w_im, .y_re(yf_re), .y_im(yf_im)
  );

  // scale by 2^-S1 and saturate to the multiplier width
  logic signed [BW-1:0] ye_re, ye_im;
  logic                 ye_ovf_re, ye_ovf_im;

  sat_trunc #(.IN_W(YW + S1), .IN_FRAC(BI + BW - 2 + S1), .OUT_W(BW)) u_sat_yr (
    .din((YW+S1)'(yf_re)), .dout(ye_re), .ovf(ye_ovf_re)
  );
  sat_trunc #(.IN_W(YW + S1), .IN_FRAC(BI + BW - 2 + S1), .OUT_W(BW)) u_sat_yi (
    .din((YW+S1)'(yf_im)), .dout(ye_im), .ovf(ye_ovf_im)
  );

  assign y_re = ye_re[BW-1 -: BO];
  assign y_im = ye_im[BW-1 -: BO];

  // ---------------- input delay to meet y ----------------
  logic [BI-1:0] xd1_re [N], xd1_im [N], xd2_re [N], xd2_im [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin
        xd1_re[i] <= '0; xd1_im[i] <= '0; xd2_re[i] <= '0; xd2_im[i] <= '0;
      end
    end else if (en) begin
      xd1_re <= x_re;   xd1_im <= x_im;
      xd2_re <= xd1_re; xd2_im <= xd1_im;
    end
  end

  // ---------------- error-forward path ----------------
  logic signed [2*BW-1:0] g_re [N], g_im [N];

  efp #(.N(N), .BI(BI), .BW(BW), .BO(BO), .POT(POT), .S2(S2), .SIGMA2(SIGMA2)) u_efp (
    .clk, .rst_n, .en, .x_re(xd2_re), .x_im(xd2_im),
    .ye_re, .ye_im, .yo_re(y_re), .yo_im(y_im), .g_re, .g_im
  );

  // ---------------- pipeline occupancy ----------------
  // vld[s] = stage s+1 holds a sample taken after the last init.
  logic [P-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    vld <= '0;
    else if (init) vld <= '0;
    else if (en)   vld <= {vld[P-2:0], 1'b1};
  end

  assign y_valid = vld[1];

  // ---------------- weights ----------------
  weight_bank #(.N(N), .BW(BW), .SH(MU_SH + S3), .W_INIT_RE(W_INIT_RE)) u_wb (
    .clk, .rst_n, .load(init), .upd(en & adapt & vld[P-1] & ~init),
    .g_re, .g_im, .w_re, .w_im
  );
endmodule
