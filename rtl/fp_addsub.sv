// fp_addsub: IEEE-754 single-precision adder/subtractor with a registered
// output: r = a + b when sub = 0, r = a - b when sub = 1.
//
// The four steps of a floating-point add are done in one combinational
// pass: zero check (a zero operand passes the other one through), alignment
// of the smaller significand by the exponent difference, addition or
// subtraction of the significands, and normalisation (one place right after
// a carry, or left past any leading zeros after a cancellation). The
// aligned significand carries 26 extra low bits and a sticky bit, so the
// truncated result is that of the exact sum. One register holds the
// result, loaded when en is high: one enabled clock of latency.
//
// Following the document: single precision with bias 127, the four steps
// and their order, one register after the combinational logic. This
// design's choices: truncation (round toward zero); zero exponent fields
// read as zero (no subnormals); results below the normal range flush to
// zero and above it become infinity; no special handling of infinities
// and NaNs at the inputs; an exact cancellation gives +0.
module fp_addsub (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        sub,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] r
);
  localparam int G  = 26;          // extra alignment bits below the LSB
  localparam int MW = 24 + G;      // aligned significand width

  logic        sa, sb, za, zb, a_big;
  logic        s_l, s_s;
  logic [7:0]  e_l, e_s, d;
  logic [MW-1:0] m_l, m_s, m_s_al, lost;
  logic        sticky;
  logic [MW:0] sum;
  int          lead;
  logic signed [9:0] er;
  logic [MW:0] norm;
  logic [31:0] r_c;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    za = (a[30:23] == '0);
    zb = (b[30:23] == '0);
    a_big = (a[30:0] >= b[30:0]);
    // larger magnitude first
    s_l = a_big ? sa : sb;          s_s = a_big ? sb : sa;
    e_l = a_big ? a[30:23] : b[30:23];
    e_s = a_big ? b[30:23] : a[30:23];
    m_l = {1'b1, (a_big ? a[22:0] : b[22:0]), G'(0)};
    m_s = {1'b1, (a_big ? b[22:0] : a[22:0]), G'(0)};
    d   = e_l - e_s;
    // align with sticky bit
    if (d >= 8'(MW)) begin
      m_s_al = '0;
      lost   = '0;
      sticky = 1'b1;
    end else begin
      m_s_al = m_s >> d;
      lost   = m_s & ((MW'(1) << d) - MW'(1));
      sticky = (lost != '0);
    end
    m_s_al[0] = m_s_al[0] | sticky;
    // add or subtract
    sum = (s_l == s_s) ? ({1'b0, m_l} + {1'b0, m_s_al}) : ({1'b0, m_l} - {1'b0, m_s_al});
    // normalise
    lead = 0;
    for (int i = 0; i <= MW; i++) if (sum[i]) lead = i;
    er   = 10'(e_l) + 10'(lead) - 10'(MW - 1);
    if (lead >= MW) norm = sum >> (lead - (MW - 1));
    else            norm = sum << ((MW - 1) - lead);
    // result
    if (za && zb)           r_c = {sa & sb, 31'd0};
    else if (zb)            r_c = a;
    else if (za)            r_c = {sb, b[30:0]};
    else if (sum == '0)     r_c = 32'd0;
    else if (er <= 0)       r_c = {s_l, 31'd0};
    else if (er >= 255)     r_c = {s_l, 8'hFF, 23'd0};
    else                    r_c = {s_l, er[7:0], norm[MW-2 -: 23]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= '0;
    else if (en) r <= r_c;
  end
endmodule
