// fast_lms_filter: adaptive FIR noise canceller with the Fast-LMS update.
//
// Every audio sample the filter predicts the incoming noise sample d(k) from
// the TAPS samples before it, u(k-1) ... u(k-TAPS), and outputs the error
//   y(k) = sum_i w_i * u_i            (filter output, w in Q(WFRAC))
//   e(k) = d(k) - y(k)                (reduced-noise output)
// The weights then adapt with the Fast-LMS rule, which replaces the step size
// by a right shift and the input value by its sign bit:
//   w_i <= w_i + (sign(u_i) * e(k)) >>> MU_SHIFT
// The filter output and the error are combinational (continuous assignments)
// over the weight and tap registers.
//
// A six-state controller sequences one sample:
//   IDLE    wait for sample_tick (rising edge of the DAC L/R clock)
//   SAMPLE  take the new noise sample into d
//   WEIGHTS update all weights in parallel; register e(k) as error_out
//   STORE   write the sample into the circular history buffer
//   INC     advance the buffer's base pointer
//   RESTORE reload tap i from the buffer, one tap per cycle
// so one sample takes TAPS + 5 clock cycles from sample_tick back to IDLE, and
// error_out / out_valid appear two cycles after sample_tick. A tick that
// arrives while the controller is busy is dropped and flagged on overrun.
//
// The equations, the state sequence and the circular buffer follow the
// design description. The number of taps, the word widths, the Q15 weight
// format, the shift amount, the sign of a zero input (treated as positive),
// the saturation of e(k), y(k) and the weights, and registering e(k) at the
// weight update are this design's choices.
module fast_lms_filter
  import anc_pkg::*;
#(
  parameter int unsigned TAPS     = 16,
  parameter int unsigned WEIGHT_W = 24,
  parameter int unsigned WFRAC    = 15,
  parameter int unsigned MU_SHIFT = 8,
  localparam int unsigned AW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_tick,  // one-cycle strobe: new frame on the DAC clock
  input  sample_t noise_in,     // latest noise sample from the ADC
  output sample_t error_out,    // e(k), reduced-noise sample for the DAC
  output sample_t filter_out,   // y(k) that produced error_out
  output logic    out_valid,    // one-cycle strobe: error_out updated
  output logic    busy,         // controller not in IDLE
  output logic    overrun,      // one-cycle strobe: sample_tick while busy
  output logic [AW-1:0] hist_base // base pointer of the history buffer
);

  localparam int unsigned ACC_W = WEIGHT_W + SAMPLE_W + AW + 1;
  typedef logic signed [WEIGHT_W-1:0] weight_t;
  typedef logic signed [ACC_W-1:0]    acc_t;

  localparam weight_t W_MAX = weight_t'({1'b0, {(WEIGHT_W-1){1'b1}}});
  localparam weight_t W_MIN = weight_t'({1'b1, {(WEIGHT_W-1){1'b0}}});
  localparam acc_t    S_MAX = acc_t'(32767);
  localparam acc_t    S_MIN = acc_t'(-32768);

  lms_state_e state;
  sample_t    d_reg;
  sample_t    u [TAPS];
  weight_t    w [TAPS];
  logic [AW:0] rd_cnt;     // restore counter: reads issued
  logic        rd_pending; // a read result arrives this cycle
  logic [AW-1:0] rd_dst;   // tap that the arriving read belongs to

  // ---------------- continuous filter output and error ----------------
  acc_t    y_acc, y_shift, e_wide;
  sample_t y_sat, e_sat;

  always_comb begin
    y_acc = '0;
    for (int i = 0; i < TAPS; i++)
      y_acc += acc_t'(w[i]) * acc_t'(u[i]);
    y_shift = y_acc >>> WFRAC;
    y_sat   = (y_shift > S_MAX) ? sample_t'(S_MAX) :
              (y_shift < S_MIN) ? sample_t'(S_MIN) : sample_t'(y_shift);
    e_wide  = acc_t'(d_reg) - y_shift;
    e_sat   = (e_wide > S_MAX) ? sample_t'(S_MAX) :
              (e_wide < S_MIN) ? sample_t'(S_MIN) : sample_t'(e_wide);
  end

  // Fast-LMS increment for tap i: sign bit of u_i selects +e or -e.
  function automatic weight_t w_next(weight_t w_old, sample_t u_i, sample_t e);
    logic signed [WEIGHT_W+1:0] step, sum;
    step = u_i[SAMPLE_W-1] ? -(WEIGHT_W+2)'(e) : (WEIGHT_W+2)'(e);
    step = step >>> MU_SHIFT;
    sum  = (WEIGHT_W+2)'(w_old) + step;
    if (sum > (WEIGHT_W+2)'(W_MAX)) return W_MAX;
    if (sum < (WEIGHT_W+2)'(W_MIN)) return W_MIN;
    return weight_t'(sum);
  endfunction

  // ---------------- circular history buffer ----------------
  logic    hb_wr, hb_inc, hb_rd;
  sample_t hb_rdata;

  always_comb begin
    hb_wr  = (state == ST_STORE);
    hb_inc = (state == ST_INC);
    hb_rd  = (state == ST_RESTORE) && (rd_cnt < (AW+1)'(TAPS));
  end

  history_buffer #(.DEPTH(TAPS)) u_hist (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (hb_wr),
    .wr_data (d_reg),
    .inc     (hb_inc),
    .rd_en   (hb_rd),
    .rd_age  (rd_cnt[AW-1:0]),
    .rd_data (hb_rdata),
    .base    (hist_base)
  );

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      d_reg      <= '0;
      error_out  <= '0;
      filter_out <= '0;
      out_valid  <= 1'b0;
      overrun    <= 1'b0;
      rd_cnt     <= '0;
      rd_pending <= 1'b0;
      rd_dst     <= '0;
      for (int i = 0; i < TAPS; i++) begin
        u[i] <= '0;
        w[i] <= '0;
      end
    end else begin
      out_valid  <= 1'b0;
      overrun    <= sample_tick && (state != ST_IDLE);
      rd_pending <= hb_rd;
      rd_dst     <= rd_cnt[AW-1:0];
      if (rd_pending) u[rd_dst] <= hb_rdata;

      unique case (state)
        ST_IDLE:    if (sample_tick) state <= ST_SAMPLE;
        ST_SAMPLE: begin
          d_reg <= noise_in;
          state <= ST_WEIGHTS;
        end
        ST_WEIGHTS: begin
          for (int i = 0; i < TAPS; i++) w[i] <= w_next(w[i], u[i], e_sat);
          error_out  <= e_sat;
          filter_out <= y_sat;
          out_valid  <= 1'b1;
          state      <= ST_STORE;
        end
        ST_STORE:   state <= ST_INC;
        ST_INC: begin
          rd_cnt <= '0;
          state  <= ST_RESTORE;
        end
        ST_RESTORE: begin
          if (rd_cnt < (AW+1)'(TAPS)) rd_cnt <= rd_cnt + 1'b1;
          else                        state  <= ST_IDLE;  // last tap lands now
        end
        default:    state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

endmodule
