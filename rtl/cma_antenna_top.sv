// cma_antenna_top: CMA adaptive phased-array controller and processor.
//
// Ties the two techniques of the design together. First the hardware-
// assisted initialization (beam_init_ctrl) scans the four RF beams of the
// phased array, reading the power detector for each, and leaves the
// strongest beam switched in. Then the 5D pipelined DCMA processor
// (dcma_unit) starts from its initial weights and adapts on the phase-
// excited element signals. The samples come either live from the eight
// 8-bit ADC channels (src_ram = 0, one sample per adc_valid) or from the
// 2048-sample test RAM (src_ram = 1), which the test controller plays back
// at one sample per clock, as in the document's testing system.
//
// Flow: start -> scan (NB+1 clocks) -> weights loaded -> adaptation. In RAM
// mode run_done pulses after the last sample and the weights then hold;
// in live mode adaptation continues until the next start. When POT = 1 the
// two's-complement samples are converted to power-of-two format on the way
// in. The RAM is loaded through ld_we/ld_addr/ld_data (word layout as in
// sample_ram). The RF antenna, phase shifters, detector, converters and
// host link are outside: their signals are ports. The flow follows the
// document; the source selection and handshake are this design's.
//
// Beside this path stands the floating-point MAC-based CMA processor of
// the first prototype (fp_mac_cma), with its own ports (fp_*): snapshots
// enter on fp_x_valid, one every 69 clocks at most, and fp_init reloads
// its weights. It shares only the clock and reset.
module cma_antenna_top
  import cma_pkg::*;
#(
  parameter int unsigned N      = NUM_ELEM,
  parameter int unsigned BI     = 8,
  parameter int unsigned BO     = 8,
  parameter int unsigned BW     = 12,
  parameter bit          POT    = 1'b1,
  parameter int unsigned MU_SH  = 10,
  parameter int unsigned DEPTH  = 2048,
  parameter int unsigned NB     = NUM_BEAMS,
  parameter int unsigned PW     = 8,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned RW    = 2 * N * BI,
  localparam int unsigned BB    = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  input  logic                 src_ram,
  output logic                 scan_busy,
  output logic                 scan_done,
  output logic                 running,
  output logic                 run_done,
  // beam switching and power detector
  input  logic [PW-1:0]        pwr,
  output logic [N-1:0]         ps_ctrl,
  output logic [BB-1:0]        beam_sel,
  // live ADC samples
  input  logic signed [BI-1:0] adc_re [N],
  input  logic signed [BI-1:0] adc_im [N],
  input  logic                 adc_valid,
  // test RAM load port
  input  logic                 ld_we,
  input  logic [AW-1:0]        ld_addr,
  input  logic [RW-1:0]        ld_data,
  // array output and weights
  output logic signed [BO-1:0] y_re,
  output logic signed [BO-1:0] y_im,
  output logic                 y_valid,
  output logic signed [BW-1:0] w_re [N],
  output logic signed [BW-1:0] w_im [N],
  // floating-point MAC-based CMA processor
  input  logic                 fp_init,
  input  logic                 fp_x_valid,
  input  logic signed [BI-1:0] fp_x_re [N],
  input  logic signed [BI-1:0] fp_x_im [N],
  output logic                 fp_busy,
  output logic signed [BI-1:0] fp_y_re,
  output logic signed [BI-1:0] fp_y_im,
  output logic                 fp_y_valid,
  output logic [31:0]          fp_y_re_f,
  output logic [31:0]          fp_y_im_f,
  output logic [31:0]          fp_w_re [N],
  output logic [31:0]          fp_w_im [N]
);
  // ---------------- sequencing ----------------
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_RUN} state_e;
  state_e state;
  logic   use_ram;
  logic   scan_end, ram_start, cma_init;
  logic [PW-1:0] best_pwr;

  beam_init_ctrl #(.NB(NB), .N(N), .PW(PW)) u_scan (
    .clk, .rst_n, .start(start && state != S_SCAN), .pwr, .ps_ctrl,
    .best(beam_sel), .best_pwr, .busy(scan_busy), .done(scan_end)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      use_ram   <= 1'b0;
      ram_start <= 1'b0;
      cma_init  <= 1'b0;
      scan_done <= 1'b0;
    end else begin
      ram_start <= 1'b0;
      cma_init  <= 1'b0;
      if (start && state != S_SCAN) begin
        state     <= S_SCAN;
        use_ram   <= src_ram;
        scan_done <= 1'b0;
      end else if (state == S_SCAN && scan_end) begin
        state     <= S_RUN;
        scan_done <= 1'b1;
        cma_init  <= 1'b1;
        ram_start <= use_ram;
      end else if (state == S_RUN && use_ram && run_done) begin
        state     <= S_IDLE;
      end
    end
  end

  assign running = (state == S_RUN);

  // ---------------- test RAM and controller ----------------
  logic [AW-1:0] raddr;
  logic [RW-1:0] rdata;
  logic          ram_en, ram_busy;

  sample_ram #(.DEPTH(DEPTH), .WIDTH(RW)) u_ram (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_data), .raddr, .rdata
  );

  test_ctrl #(.DEPTH(DEPTH)) u_tctl (
    .clk, .rst_n, .start(ram_start), .raddr, .sample_en(ram_en),
    .busy(ram_busy), .done(run_done)
  );

  // ---------------- sample selection and format ----------------
  logic signed [BI-1:0] s_re [N], s_im [N];
  logic        [BI-1:0] x_re [N], x_im [N];
  logic                 en;

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (use_ram) begin
        s_re[i] = rdata[2*BI*i      +: BI];
        s_im[i] = rdata[2*BI*i + BI +: BI];
      end else begin
        s_re[i] = adc_re[i];
        s_im[i] = adc_im[i];
      end
    end
  end

  // No sample is taken in the clock that loads the initial weights.
  assign en = running & ~cma_init & (use_ram ? ram_en : adc_valid);

  for (genvar i = 0; i < int'(N); i++) begin : g_fmt
    if (POT) begin : g_pot
      pot_encoder #(.BI(BI)) u_enc_re (.d(s_re[i]), .p(x_re[i]));
      pot_encoder #(.BI(BI)) u_enc_im (.d(s_im[i]), .p(x_im[i]));
    end else begin : g_fxp
      assign x_re[i] = s_re[i];
      assign x_im[i] = s_im[i];
    end
  end

  // ---------------- DCMA processor ----------------
  dcma_unit #(.N(N), .BI(BI), .BO(BO), .BW(BW), .POT(POT), .MU_SH(MU_SH)) u_dcma (
    .clk, .rst_n, .init(cma_init), .en, .adapt(1'b1),
    .x_re, .x_im, .y_re, .y_im, .y_valid, .w_re, .w_im
  );

  // ---------------- floating-point MAC processor ----------------
  fp_mac_cma #(.N(N), .BI(BI), .FRAC(BI - 1)) u_fp (
    .clk, .rst_n, .init(fp_init), .x_valid(fp_x_valid), .x_re(fp_x_re), .x_im(fp_x_im),
    .busy(fp_busy), .y_re(fp_y_re), .y_im(fp_y_im), .y_valid(fp_y_valid),
    .y_re_f(fp_y_re_f), .y_im_f(fp_y_im_f), .w_re(fp_w_re), .w_im(fp_w_im)
  );
endmodule
