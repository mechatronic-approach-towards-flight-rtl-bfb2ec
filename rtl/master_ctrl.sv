// Master control unit of the wavelet accelerator.
//
// One controller runs the whole accelerator. On each sampling trigger it
// starts the ADCs, waits for their conversion, writes the new sample of
// every input into its circular buffer, and then sweeps the tap index k
// from 0 (newest sample) to WINDOW-1 (oldest). For every k it reads the
// circular buffers and the wavelet tables of all channels at once and
// broadcasts a tap control word to the convolution units, which therefore
// all work in lock step: adding channels costs no time. When the units
// report their results it pulses `done` once.
//
// States: IDLE -> CONVERT (ADC busy) -> SWEEP (WINDOW cycles) -> DRAIN
// (unit pipeline) -> IDLE. A trigger that arrives outside IDLE is dropped
// and reported on `overrun`.
//
// Timing: rd_en/rd_age go to the memories, whose data appear one cycle
// later; `tap` is registered so that it arrives together with that data.
// From adc_done to done takes WINDOW + 5 cycles with the
// default three-stage units (the wait for res_valid adapts to the unit).
// The tasks of the unit follow the document; the state sequence and the
// ADC handshake (start pulse, done pulse with parallel data) are this
// design's.
module master_ctrl
  import flutter_pkg::*;
#(
  parameter int unsigned N_IN   = N_INPUTS,
  parameter int unsigned DEPTH  = WINDOW,
  parameter int unsigned X_W    = SAMPLE_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               trig,       // sampling instant
  // ADC handshake
  output logic                               adc_start,
  input  logic                               adc_done,
  input  logic [N_IN-1:0][X_W-1:0]           adc_data,
  // circular buffers
  output logic                               buf_wr,
  output logic [N_IN-1:0][X_W-1:0]           buf_data,
  // tap sweep
  output logic                               rd_en,
  output logic [$clog2(DEPTH)-1:0]           rd_age,
  output tap_ctl_t                           tap,
  // results
  input  logic                               units_valid,
  output logic                               done,
  output logic                               busy,
  output logic                               overrun
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_CONVERT, S_SWEEP, S_DRAIN} state_e;
  state_e        state;
  logic [AW-1:0] k;

  assign busy  = (state != S_IDLE);
  assign rd_en = (state == S_SWEEP);
  assign rd_age = k;
  // the new samples are written in the cycle the ADC reports them, so the
  // first read of the sweep already sees them
  assign buf_wr   = (state == S_CONVERT) && adc_done;
  assign buf_data = adc_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      adc_start <= 1'b0;
      tap       <= '0;
      done      <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      adc_start <= 1'b0;
      done      <= 1'b0;
      overrun   <= trig && (state != S_IDLE);
      // tap word is the registered image of this cycle's read
      tap.valid <= (state == S_SWEEP);
      tap.first <= (state == S_SWEEP) && (k == '0);
      tap.last  <= (state == S_SWEEP) && (k == AW'(DEPTH-1));
      tap.idx   <= 16'(k);
      unique case (state)
        S_IDLE: if (trig) begin
          adc_start <= 1'b1;
          state     <= S_CONVERT;
        end
        S_CONVERT: if (adc_done) begin
          k        <= '0;
          state    <= S_SWEEP;
        end
        S_SWEEP: begin
          if (k == AW'(DEPTH-1)) state <= S_DRAIN;
          else                   k     <= k + 1'b1;
        end
        S_DRAIN: if (units_valid) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
