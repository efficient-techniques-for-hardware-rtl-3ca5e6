// ffp: feed-forward path of the pipelined DCMA processor, y = w^H x.
//
// N processing modules form conj(w_i) x_i in parallel (one register after
// each multiplier); their outputs are summed by a binary adder tree of
// log2(N) levels, and only the root of the tree is registered. The array
// output is therefore valid two enabled clocks after x (the document's
// feed-forward delay m = 2), with 4N + 2 registers (18 for N = 4) and a
// critical path of one multiplier. The output keeps full precision:
// BI+BW+log2(N)+1 bits with BI+BW-2 fraction bits. x is in the format set
// by POT (see cplx_pm). The tree structure and register placement are the
// document's; N must be a power of two.
module ffp #(
  parameter int unsigned N   = 4,
  parameter int unsigned BI  = 8,
  parameter int unsigned BW  = 12,
  parameter bit          POT = 1'b1,
  localparam int unsigned YW = BI + BW + $clog2(N) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic        [BI-1:0] x_re [N],
  input  logic        [BI-1:0] x_im [N],
  input  logic signed [BW-1:0] w_re [N],
  input  logic signed [BW-1:0] w_im [N],
  output logic signed [YW-1:0] y_re,
  output logic signed [YW-1:0] y_im
);
  localparam int unsigned L = $clog2(N);

  // Level 0 of the tree holds the PM outputs; level l holds N >> l sums.
  for (genvar l = 0; l <= int'(L); l++) begin : g_lvl
    logic signed [YW-1:0] s_re [N >> l];
    logic signed [YW-1:0] s_im [N >> l];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < int'(N); i++) begin : g_pm
        logic signed [BI+BW:0] z_re, z_im;
        cplx_pm #(.BI(BI), .BW(BW), .POT(POT)) u_pm (
          .clk, .rst_n, .en,
          .a_re(w_re[i]), .a_im(w_im[i]), .c_re(x_re[i]), .c_im(x_im[i]),
          .z_re, .z_im
        );
        assign s_re[i] = YW'(z_re);
        assign s_im[i] = YW'(z_im);
      end
    end else begin : g_add
      for (genvar j = 0; j < int'(N >> l); j++) begin : g_node
        assign s_re[j] = g_lvl[l-1].s_re[2*j] + g_lvl[l-1].s_re[2*j+1];
        assign s_im[j] = g_lvl[l-1].s_im[2*j] + g_lvl[l-1].s_im[2*j+1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= g_lvl[L].s_re[0];
      y_im <= g_lvl[L].s_im[0];
    end
  end
endmodule
