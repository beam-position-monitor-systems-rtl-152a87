// Acquisition timing control of the PCI card.
//
// Decides which ADC-clock samples of the eight arrays go into the FIFOs.
// The host arms it; the next rising edge of the external trigger (a front
// panel input, synchronised here by two flip-flops) starts a delay of
// `trig_dly` clocks, after which 2*`npairs` consecutive samples of all
// eight arrays are written (`fifo_wr` high). Then `done` is set until the
// next arm. Triggers while not armed are counted but start nothing; samples
// the DFE marks not valid are skipped and do not count.
//
// The hardware description names the timing controls and the trigger input
// but gives no detail: the arm/trigger/delay/window sequence, the pair
// count and the trigger counter are this design's choices.
//
// Timing: all on the ADC clock; `arm` is a one-clock pulse. The first sample
// written is the one present `trig_dly` + 3 clocks after the trigger edge
// reaches the input.
module acq_ctrl
  import bpm_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                arm,
  input  logic                trigger,      // asynchronous
  input  logic [NPAIRS_W-1:0] npairs,       // >= 1
  input  logic [15:0]         trig_dly,
  input  logic                data_valid,
  output logic                fifo_wr,
  output logic                armed,
  output logic                busy,
  output logic                done,
  output logic [15:0]         trig_cnt
);

  typedef enum logic [1:0] {A_IDLE, A_ARMED, A_DELAY, A_CAPTURE} astate_e;

  astate_e             state;
  logic [2:0]          trig_sync;
  logic                trig_rise;
  logic [15:0]         dly_cnt;
  logic [NPAIRS_W:0]   left;     // samples still to write

  assign trig_rise = trig_sync[1] && !trig_sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_sync <= '0;
      trig_cnt  <= '0;
      state     <= A_IDLE;
      dly_cnt   <= '0;
      left      <= '0;
      done      <= 1'b0;
    end else begin
      trig_sync <= {trig_sync[1:0], trigger};
      if (trig_rise) trig_cnt <= trig_cnt + 1'b1;
      unique case (state)
        A_IDLE: if (arm) begin
          state <= A_ARMED;
          done  <= 1'b0;
        end
        A_ARMED: if (trig_rise) begin
          left <= {npairs, 1'b0};
          if (trig_dly == 0) state <= A_CAPTURE;
          else begin
            state   <= A_DELAY;
            dly_cnt <= trig_dly - 1'b1;
          end
        end
        A_DELAY: begin
          if (dly_cnt == 0) state <= A_CAPTURE;
          else              dly_cnt <= dly_cnt - 1'b1;
        end
        default: begin  // A_CAPTURE
          if (data_valid) begin
            left <= left - 1'b1;
            if (left == 1) begin
              state <= A_IDLE;
              done  <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  assign fifo_wr = (state == A_CAPTURE) && data_valid;
  assign armed   = (state == A_ARMED);
  assign busy    = (state == A_DELAY) || (state == A_CAPTURE);

endmodule
