// fp_mac_cma: floating-point CMA processor built around one multiply-and-
// accumulate unit that is reused for every antenna element.
//
// For each snapshot x (N complex 8-bit samples) it computes the array
// output y = w^H x, the constant-modulus error e = |y|^2 - sigma^2, and
// the update w <- w - mu * e * x * conj(y), all in IEEE single precision.
// A snapshot is taken into an input latch on x_valid (when not busy).
// An 2N-channel multiplexer then feeds the I and Q samples one per clock
// through int_to_fp (samples read as Q1.FRAC fractions) into a register
// file. A microprogram of MAC steps follows: each step multiplies two
// registers (fp_mul) and, one clock later, adds the product to or
// subtracts it from the accumulator (fp_addsub), or starts a new sum; the
// last step of a sum writes the accumulator back to a register. The
// multiplier and adder are each one register deep, so a dependent sum
// waits two idle steps. Finally y is converted to Q1.FRAC integers through
// fp_to_int for the D/A converter.
//
// Timing: 1 clock to latch, 2N+1 clocks to load, 10N+16 microprogram
// clocks, 3 clocks to convert the output: 69 clocks per snapshot at N = 4,
// a little over the 64 clocks that a 16 MHz clock leaves per sample at
// 250 kHz.
// busy is high from x_valid to y_valid; y_valid pulses with the new y;
// the weights w_re/w_im (single-precision words) then already hold
// w(k+1). init loads the weights with W_INIT + j0.
//
// Following the document: a single floating-point MAC shared across the
// elements through multiplexers, an input latch, conversion of the
// fixed-point samples to floating point and of the output back, the CMA
// update with step size mu. This design's choices: the register file and
// microprogram order, the idle steps, sigma^2 = 1, mu = 2^-10, initial
// weights 0.25 + j0 on every element, the Q1.7 reading of the samples, the
// update using the current sample (no delay), and truncating arithmetic.
module fp_mac_cma #(
  parameter int unsigned N       = 4,
  parameter int unsigned BI      = 8,
  parameter int unsigned FRAC    = 7,
  parameter logic [31:0] MU      = 32'h3A80_0000,   // 2^-10
  parameter logic [31:0] SIGMA2  = 32'h3F80_0000,   // 1.0
  parameter logic [31:0] W_INIT  = 32'h3E80_0000    // 0.25
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic                 x_valid,
  input  logic signed [BI-1:0] x_re [N],
  input  logic signed [BI-1:0] x_im [N],
  output logic                 busy,
  output logic signed [BI-1:0] y_re,
  output logic signed [BI-1:0] y_im,
  output logic                 y_valid,
  output logic [31:0]          y_re_f,
  output logic [31:0]          y_im_f,
  output logic [31:0]          w_re [N],
  output logic [31:0]          w_im [N]
);
  // register file map: X (2N), W (2N), then scalars and constants
  localparam int XB = 0, WB = 2 * N;
  localparam int YR = 4 * N, YI = YR + 1, E = YR + 2, CR = YR + 3, CI = YR + 4;
  localparam int SG = YR + 5, ONE = YR + 6, MUR = YR + 7, NR = YR + 8;
  localparam int RA = $clog2(NR);
  localparam int WBASE = 4 * N + 14;             // first weight-update step
  localparam int NSTEP = WBASE + 6 * N + 2;      // incl. two drain clocks
  localparam int CW = $clog2(NSTEP + 1);

  typedef struct packed {
    logic          valid;   // a MAC step (not an idle step)
    logic          clr;     // start a new sum
    logic          sub;     // subtract the product
    logic          wr;      // write the sum back
    logic [RA-1:0] dest;
    logic [RA-1:0] a;
    logic [RA-1:0] b;
  } mop_t;

  function automatic mop_t step(int pc);
    mop_t m;
    int k, i;
    m = '0;
    if (pc < 2 * N) begin                        // y_re = sum wr xr + wi xi
      i = pc / 2;
      m = '{1'b1, pc == 0, 1'b0, pc == 2 * N - 1, RA'(YR),
            RA'(WB + 2 * i + pc % 2), RA'(XB + 2 * i + pc % 2)};
    end else if (pc < 4 * N) begin               // y_im = sum wr xi - wi xr
      k = pc - 2 * N; i = k / 2;
      m = '{1'b1, k == 0, k % 2 == 1, k == 2 * N - 1, RA'(YI),
            RA'(WB + 2 * i + k % 2), RA'(XB + 2 * i + 1 - k % 2)};
    end else if (pc == 4 * N + 2) m = '{1'b1, 1'b1, 1'b0, 1'b0, RA'(E), RA'(YR), RA'(YR)};
    else if (pc == 4 * N + 3)     m = '{1'b1, 1'b0, 1'b0, 1'b0, RA'(E), RA'(YI), RA'(YI)};
    else if (pc == 4 * N + 4)     m = '{1'b1, 1'b0, 1'b1, 1'b1, RA'(E), RA'(SG), RA'(ONE)};
    else if (pc == 4 * N + 7)     m = '{1'b1, 1'b1, 1'b0, 1'b1, RA'(E), RA'(E), RA'(MUR)};
    else if (pc == 4 * N + 10)    m = '{1'b1, 1'b1, 1'b0, 1'b1, RA'(CR), RA'(E), RA'(YR)};
    else if (pc == 4 * N + 11)    m = '{1'b1, 1'b1, 1'b0, 1'b1, RA'(CI), RA'(E), RA'(YI)};
    else if (pc >= WBASE && pc < WBASE + 6 * N) begin
      // wr -= xr cr + xi ci ;  wi -= xi cr - xr ci
      k = pc - WBASE; i = k / 6;
      case (k % 6)
        0: m = '{1'b1, 1'b1, 1'b0, 1'b0, RA'(WB + 2 * i),     RA'(WB + 2 * i),     RA'(ONE)};
        1: m = '{1'b1, 1'b0, 1'b1, 1'b0, RA'(WB + 2 * i),     RA'(XB + 2 * i),     RA'(CR)};
        2: m = '{1'b1, 1'b0, 1'b1, 1'b1, RA'(WB + 2 * i),     RA'(XB + 2 * i + 1), RA'(CI)};
        3: m = '{1'b1, 1'b1, 1'b0, 1'b0, RA'(WB + 2 * i + 1), RA'(WB + 2 * i + 1), RA'(ONE)};
        4: m = '{1'b1, 1'b0, 1'b1, 1'b0, RA'(WB + 2 * i + 1), RA'(XB + 2 * i + 1), RA'(CR)};
        default: m = '{1'b1, 1'b0, 1'b0, 1'b1, RA'(WB + 2 * i + 1), RA'(XB + 2 * i), RA'(CI)};
      endcase
    end
    return m;
  endfunction

  typedef enum logic [1:0] {IDLE, LOAD, EXEC, OUT} state_e;
  state_e  state;
  logic [CW-1:0] cnt;
  logic signed [BI-1:0] lat [2*N];          // input latch, I/Q interleaved
  logic [31:0] rf [NR];
  mop_t  op, op1, op2;

  // sample conversion through the 2N-channel multiplexer
  logic [31:0] xf;
  logic        cv_en;
  logic [$clog2(2*N)-1:0] ch;
  assign cv_en = (state == LOAD);
  assign ch    = (cnt < CW'(2 * N)) ? cnt[$clog2(2*N)-1:0] : '0;
  int_to_fp #(.BI(BI), .FRAC(FRAC)) u_i2f (
    .clk, .rst_n, .en(cv_en), .d(lat[ch]), .f(xf));

  // the MAC
  logic [31:0] prod, acc;
  assign op = (state == EXEC) ? step(int'(cnt)) : '0;
  fp_mul u_mul (.clk, .rst_n, .en(op.valid), .a(rf[op.a]), .b(rf[op.b]), .p(prod));
  fp_addsub u_add (.clk, .rst_n, .en(op1.valid), .sub(op1.sub),
                   .a(op1.clr ? 32'd0 : acc), .b(prod), .r(acc));

  // output conversion through one converter
  logic [31:0]          yf;
  logic signed [BI-1:0] yd;
  assign yf = (cnt == '0) ? rf[YR] : rf[YI];
  fp_to_int #(.OW(BI), .FRAC(FRAC)) u_f2i (
    .clk, .rst_n, .en(state == OUT), .f(yf), .d(yd));

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      cnt     <= '0;
      op1     <= '0;
      op2     <= '0;
      y_re    <= '0;
      y_im    <= '0;
      y_valid <= 1'b0;
      for (int i = 0; i < 2 * int'(N); i++) lat[i] <= '0;
      for (int r = 0; r < NR; r++) rf[r] <= 32'd0;
      for (int i = 0; i < int'(N); i++) rf[WB + 2 * i] <= W_INIT;
      rf[SG] <= SIGMA2; rf[ONE] <= 32'h3F80_0000; rf[MUR] <= MU;
    end else begin
      y_valid <= 1'b0;
      op1 <= op;
      op2 <= op1;
      if (op2.valid && op2.wr) rf[op2.dest] <= acc;
      if (state == LOAD && cnt != '0) rf[XB + int'(cnt) - 1] <= xf;
      case (state)
        IDLE: begin
          if (init) begin
            for (int i = 0; i < int'(N); i++) begin
              rf[WB + 2 * i] <= W_INIT; rf[WB + 2 * i + 1] <= 32'd0;
            end
          end else if (x_valid) begin
            for (int i = 0; i < int'(N); i++) begin
              lat[2 * i] <= x_re[i]; lat[2 * i + 1] <= x_im[i];
            end
            state <= LOAD;
            cnt   <= '0;
          end
        end
        LOAD: begin
          if (cnt == CW'(2 * N)) begin state <= EXEC; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        EXEC: begin
          if (cnt == CW'(NSTEP - 1)) begin state <= OUT; cnt <= '0; end
          else cnt <= cnt + 1'b1;
        end
        OUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(1)) y_re <= yd;
          if (cnt == CW'(2)) begin
            y_im    <= yd;
            y_valid <= 1'b1;
            state   <= IDLE;
            cnt     <= '0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign y_re_f = rf[YR];
  assign y_im_f = rf[YI];
  for (genvar i = 0; i < int'(N); i++) begin : g_w
    assign w_re[i] = rf[WB + 2 * i];
    assign w_im[i] = rf[WB + 2 * i + 1];
  end
endmodule
