// beam_init_ctrl: hardware-assisted initialization by beam scanning.
//
// Before CMA adapts, the array's one-bit RF phase shifters are stepped
// through the NB beams of the four-beam antenna and the received power of
// each beam is read from a power detector (through an ADC, as an unsigned
// PW-bit word). The beam with the largest power is left switched in and
// serves as the initial beam for CMA. Ties keep the earlier beam.
//
// Timing: start (one cycle) switches in beam 0. Each beam is held for
// SETTLE+1 clocks and the detector word is sampled on the last of them,
// while the next pattern is switched in. After the last beam the best
// pattern is applied and done pulses for one cycle, NB*(SETTLE+1)+1 clocks
// after start (5 clocks = 312.5 ns at 16 MHz for the defaults). The
// patterns and the scan-then-select behaviour follow the document; the
// detector word width, settle time and encoding are this design's.
module beam_init_ctrl
  import cma_pkg::*;
#(
  parameter int unsigned NB     = NUM_BEAMS,
  parameter int unsigned N      = NUM_ELEM,
  parameter int unsigned PW     = 8,
  parameter int unsigned SETTLE = 0,
  parameter logic [N-1:0] PATTERN [NB] = BEAM_PS,
  localparam int unsigned BB    = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] pwr,
  output logic [N-1:0]  ps_ctrl,
  output logic [BB-1:0] best,
  output logic [PW-1:0] best_pwr,
  output logic          busy,
  output logic          done
);
  localparam int unsigned SW = (SETTLE > 0) ? $clog2(SETTLE + 1) : 1;

  typedef enum logic [1:0] {IDLE, SCAN, HOLD} state_e;
  state_e        state;
  logic [BB-1:0] beam;
  logic [SW-1:0] wait_cnt;
  logic          better;

  assign busy   = (state == SCAN);
  assign better = (beam == '0) || (pwr > best_pwr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      beam     <= '0;
      wait_cnt <= '0;
      best     <= '0;
      best_pwr <= '0;
      ps_ctrl  <= PATTERN[0];
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        state    <= SCAN;
        beam     <= '0;
        wait_cnt <= '0;
        ps_ctrl  <= PATTERN[0];
      end else if (state == SCAN) begin
        if (wait_cnt != SW'(SETTLE)) begin
          wait_cnt <= wait_cnt + 1'b1;
        end else begin
          wait_cnt <= '0;
          if (better) begin
            best     <= beam;
            best_pwr <= pwr;
          end
          if (beam == BB'(NB - 1)) begin
            state   <= HOLD;
            done    <= 1'b1;
            ps_ctrl <= better ? PATTERN[beam] : PATTERN[best];
          end else begin
            beam    <= beam + 1'b1;
            ps_ctrl <= PATTERN[beam + 1'b1];
          end
        end
      end
    end
  end

  // A scan must not be restarted while it is running.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("beam_init_ctrl: start during a scan");
endmodule
