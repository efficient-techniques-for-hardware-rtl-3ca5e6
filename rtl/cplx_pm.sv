// cplx_pm: processing module (PM), a pipelined conjugate complex multiply.
//
// Computes z = conj(a) * c = (ac + bd) + j(ad - bc) for a = a_re + j a_im
// and c = c_re + j c_im, with four real multipliers, a register after each
// multiplier and the two adders after the registers. The multiplier-to-
// register path is the critical path (one multiply); z is valid one enabled
// clock after the operands. a is a BW-bit two's-complement Q1.(BW-1) word
// (weight or array output); c is the BI-bit input-signal operand, either
// two's complement Q1.(BI-1) (POT = 0) or sign-magnitude power-of-two
// (POT = 1), which selects pot_mult instead of fxp_mult for all four
// products. z carries BI+BW-2 fraction bits. The structure (four
// multipliers, registers after them, two adders) is the document's; the
// enable and reset are this design's.
module cplx_pm #(
  parameter int unsigned BI  = 8,
  parameter int unsigned BW  = 12,
  parameter bit          POT = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [BW-1:0]    a_re,
  input  logic signed [BW-1:0]    a_im,
  input  logic        [BI-1:0]    c_re,
  input  logic        [BI-1:0]    c_im,
  output logic signed [BI+BW:0]   z_re,
  output logic signed [BI+BW:0]   z_im
);
  localparam int unsigned PW = BI + BW;

  logic signed [PW-1:0] m_ac, m_bd, m_ad, m_bc;      // multiplier outputs
  logic signed [PW-1:0] r_ac, r_bd, r_ad, r_bc;      // pipeline registers

  if (POT) begin : g_pot
    pot_mult #(.BI(BI), .BW(BW)) u_ac (.a(a_re), .p(c_re), .prod(m_ac));
    pot_mult #(.BI(BI), .BW(BW)) u_bd (.a(a_im), .p(c_im), .prod(m_bd));
    pot_mult #(.BI(BI), .BW(BW)) u_ad (.a(a_re), .p(c_im), .prod(m_ad));
    pot_mult #(.BI(BI), .BW(BW)) u_bc (.a(a_im), .p(c_re), .prod(m_bc));
  end else begin : g_fxp
    fxp_mult #(.AW(BI), .BW(BW)) u_ac (.a(c_re), .b(a_re), .prod(m_ac));
    fxp_mult #(.AW(BI), .BW(BW)) u_bd (.a(c_im), .b(a_im), .prod(m_bd));
    fxp_mult #(.AW(BI), .BW(BW)) u_ad (.a(c_im), .b(a_re), .prod(m_ad));
    fxp_mult #(.AW(BI), .BW(BW)) u_bc (.a(c_re), .b(a_im), .prod(m_bc));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_ac <= '0; r_bd <= '0; r_ad <= '0; r_bc <= '0;
    end else if (en) begin
      r_ac <= m_ac; r_bd <= m_bd; r_ad <= m_ad; r_bc <= m_bc;
    end
  end

  assign z_re = (PW+1)'(r_ac) + (PW+1)'(r_bd);
  assign z_im = (PW+1)'(r_ad) - (PW+1)'(r_bc);
endmodule
