// efp: error-forward path of the pipelined DCMA processor.
//
// Forms the stochastic-gradient term g_i = x_i y* (|y|^2 - sigma^2) for all
// N elements in three enabled pipeline stages (the document's error-forward
// delay n = 3):
//   stage 1  N processing modules multiply x_i by conj(y) (register after
//            each multiplier); two table squarers form Re(y)^2 and Im(y)^2
//            from the 8-bit array output (register after each squarer);
//   stage 2  the PM adders finish x_i y*, which is scaled by 2^-S2 and
//            saturated/truncated to BW bits; Re^2 + Im^2 - sigma^2 is
//            saturated/truncated to BW bits; both registered;
//   stage 3  two real x real multipliers per element form g_i, registered.
// x must be the input delayed to line up with y (two samples in dcma_unit).
// Every multiplier input is BW bits wide, the weight wordlength, as in the
// document. g has 2*BW bits with 2*BW-2 fraction bits. SIGMA2 is sigma^2 in
// the squarer format (2*BO-2 fraction bits); 1.0 by default. S2 and SIGMA2
// values are this design's choices; the document leaves them open.
module efp #(
  parameter int unsigned N      = 4,
  parameter int unsigned BI     = 8,
  parameter int unsigned BW     = 12,
  parameter int unsigned BO     = 8,
  parameter bit          POT    = 1'b1,
  parameter int unsigned S2     = 0,
  parameter int unsigned SIGMA2 = 1 << (2*BO-2)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic        [BI-1:0]   x_re [N],
  input  logic        [BI-1:0]   x_im [N],
  input  logic signed [BW-1:0]   ye_re,
  input  logic signed [BW-1:0]   ye_im,
  input  logic signed [BO-1:0]   yo_re,
  input  logic signed [BO-1:0]   yo_im,
  output logic signed [2*BW-1:0] g_re [N],
  output logic signed [2*BW-1:0] g_im [N]
);
  localparam int unsigned ZW   = BI + BW + 1;           // PM output width
  localparam int unsigned EF0  = 2*BO - 2;              // squarer fraction bits
  localparam int unsigned EPAD = (EF0 < BW - 1) ? (BW - 1 - EF0) : 0;
  localparam int unsigned EW   = 2*BO + 2 + EPAD;       // error width

  // ---------------- stage 1: squarers (PMs are below) ----------------
  logic [2*BO-1:0] sq_re_c, sq_im_c, sq_re_q, sq_im_q;

  sq_lut #(.BO(BO)) u_sq_re (.d(yo_re), .sq(sq_re_c));
  sq_lut #(.BO(BO)) u_sq_im (.d(yo_im), .sq(sq_im_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_re_q <= '0;
      sq_im_q <= '0;
    end else if (en) begin
      sq_re_q <= sq_re_c;
      sq_im_q <= sq_im_c;
    end
  end

  // ---------------- stage 2: |y|^2 - sigma^2 ----------------
  logic signed [EW-1:0] err_full;
  logic signed [BW-1:0] err_c, err_q;
  logic                 err_ovf;

  assign err_full = (EW'(sq_re_q) + EW'(sq_im_q) - EW'(SIGMA2)) <<< EPAD;

  sat_trunc #(.IN_W(EW), .IN_FRAC(EF0 + EPAD), .OUT_W(BW)) u_sat_e (
    .din(err_full), .dout(err_c), .ovf(err_ovf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  err_q <= '0;
    else if (en) err_q <= err_c;
  end

  // ---------------- per element ----------------
  for (genvar i = 0; i < int'(N); i++) begin : g_el
    logic signed [ZW-1:0]   z_re, z_im;
    logic signed [BW-1:0]   xy_re_c, xy_im_c, xy_re_q, xy_im_q;
    logic signed [2*BW-1:0] m_re, m_im;
    logic                   ovf_re, ovf_im;

    // stage 1: x_i * conj(y)
    cplx_pm #(.BI(BI), .BW(BW), .POT(POT)) u_pm (
      .clk, .rst_n, .en,
      .a_re(ye_re), .a_im(ye_im), .c_re(x_re[i]), .c_im(x_im[i]),
      .z_re, .z_im
    );

    // stage 2: scale by 2^-S2, saturate to the multiplier width
    // (sign-extended by S2 bits so that the scaled word keeps its range)
    sat_trunc #(.IN_W(ZW + S2), .IN_FRAC(BI + BW - 2 + S2), .OUT_W(BW)) u_sat_re (
      .din((ZW+S2)'(z_re)), .dout(xy_re_c), .ovf(ovf_re)
    );
    sat_trunc #(.IN_W(ZW + S2), .IN_FRAC(BI + BW - 2 + S2), .OUT_W(BW)) u_sat_im (
      .din((ZW+S2)'(z_im)), .dout(xy_im_c), .ovf(ovf_im)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xy_re_q <= '0;
        xy_im_q <= '0;
      end else if (en) begin
        xy_re_q <= xy_re_c;
        xy_im_q <= xy_im_c;
      end
    end

    // stage 3: (x_i y*) * (|y|^2 - sigma^2)
    fxp_mult #(.AW(BW), .BW(BW)) u_m_re (.a(xy_re_q), .b(err_q), .prod(m_re));
    fxp_mult #(.AW(BW), .BW(BW)) u_m_im (.a(xy_im_q), .b(err_q), .prod(m_im));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        g_re[i] <= '0;
        g_im[i] <= '0;
      end else if (en) begin
        g_re[i] <= m_re;
        g_im[i] <= m_im;
      end
    end
  end
endmodule
