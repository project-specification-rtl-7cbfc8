// clock_calib - clock phase and delay calibration of one serial line.
//
// During a calibration run the transmitter repeats the pattern 10100101, so a
// correctly aligned line reads the nibbles A and 5 alternately.
//   Stage 1: for each of the four clock phases the serial-to-parallel converter
//   is cleared, 4 cycles are let pass, and the next 7 nibbles are sorted into
//   the four word pairs (A,5) (9,6) (4,B) (2,D); the largest of the four counts is
//   that phase's histogram entry.  The phase with the largest entry is chosen
//   (ties go to the lower phase).
//   Stage 2: with the chosen phase and zero delay the converter is cleared again,
//   after 4 cycles one nibble is sampled and the delay is looked up:
//   A/5 -> 0, 4/B -> 1, 9/6 -> 2, 2/D -> 3 bit periods.
//   Check: with the final setting, 4 nibbles are skipped and the next 8 must all
//   be A or 5; `sync_ok` reports the result.
// A run starts on a rising edge of `en_cal`; `done` pulses for one clock when the
// phase and delay outputs hold the final result.  All timing is in 40 MHz cycles.
// The stages, the 7/4/8 sample counts and the word table follow the calibration
// scheme of the specification; tie breaking, the start condition and what happens
// with an unknown stage-2 word (sync_ok stays low) are this design's choices.
module clock_calib #(
  parameter int unsigned N_SAMPLES = 7,
  parameter int unsigned N_PAUSE   = 4,
  parameter int unsigned N_CHECK   = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en_cal,
  input  logic [3:0] nibble,
  output logic [1:0] phase,
  output logic [1:0] dly,
  output logic       s2p_clr,
  output logic       busy,
  output logic       done,
  output logic       sync_ok
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_PAUSE, S_COUNT, S_NEXT,
    S_DCLR, S_DPAUSE, S_DSAMPLE,
    S_CWAIT, S_CCHECK, S_END
  } state_t;

  state_t     state;
  logic       en_q;
  logic [3:0] cnt;              // cycle counter within a state
  logic [3:0] pc [4];           // pair counts of the current phase
  logic [3:0] hist [4];         // best pair count per phase
  logic       ok;
  logic [1:0] pair_idx;
  logic       pair_hit;
  logic [3:0] pc_max;
  logic [1:0] best;

  // which of the four calibration word pairs a nibble belongs to
  always_comb begin
    pair_hit = 1'b1;
    pair_idx = 2'd0;
    unique case (nibble)
      4'hA, 4'h5: pair_idx = 2'd0;
      4'h4, 4'hB: pair_idx = 2'd1;
      4'h9, 4'h6: pair_idx = 2'd2;
      4'h2, 4'hD: pair_idx = 2'd3;
      default:    pair_hit = 1'b0;
    endcase
  end

  always_comb begin
    pc_max = pc[0];
    for (int i = 1; i < 4; i++) if (pc[i] > pc_max) pc_max = pc[i];
    best = 2'd0;
    for (int i = 1; i < 4; i++) if (hist[i] > hist[best]) best = 2'(i);
  end

  assign busy    = (state != S_IDLE) && (state != S_END);
  assign s2p_clr = (state == S_CLR) || (state == S_DCLR);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      en_q    <= 1'b0;
      cnt     <= '0;
      phase   <= '0;
      dly     <= '0;
      done    <= 1'b0;
      sync_ok <= 1'b0;
      ok      <= 1'b0;
      for (int i = 0; i < 4; i++) begin pc[i] <= '0; hist[i] <= '0; end
    end else begin
      en_q <= en_cal;
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (en_cal && !en_q) begin
          state   <= S_CLR;
          phase   <= 2'd0;
          dly     <= 2'd0;
          sync_ok <= 1'b0;
        end
        S_CLR: begin
          state <= S_PAUSE;
          cnt   <= '0;
          for (int i = 0; i < 4; i++) pc[i] <= '0;
        end
        S_PAUSE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(N_PAUSE - 1)) begin state <= S_COUNT; cnt <= '0; end
        end
        S_COUNT: begin
          if (pair_hit) pc[pair_idx] <= pc[pair_idx] + 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt == 4'(N_SAMPLES - 1)) state <= S_NEXT;
        end
        S_NEXT: begin
          hist[phase] <= pc_max;
          if (phase == 2'd3) state <= S_DCLR;
          else begin phase <= phase + 1'b1; state <= S_CLR; end
        end
        S_DCLR: begin
          phase <= best;
          dly   <= 2'd0;
          cnt   <= '0;
          state <= S_DPAUSE;
        end
        S_DPAUSE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(N_PAUSE - 1)) state <= S_DSAMPLE;
        end
        S_DSAMPLE: begin
          cnt <= '0;
          if (pair_hit) begin
            dly   <= pair_idx;
            ok    <= 1'b1;
            state <= S_CWAIT;
          end else begin
            done  <= 1'b1;
            state <= S_END;
          end
        end
        S_CWAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(N_PAUSE - 1)) begin state <= S_CCHECK; cnt <= '0; end
        end
        S_CCHECK: begin
          if (!(nibble == 4'hA || nibble == 4'h5)) ok <= 1'b0;
          cnt <= cnt + 1'b1;
          if (cnt == 4'(N_CHECK - 1)) begin
            sync_ok <= ok && (nibble == 4'hA || nibble == 4'h5);
            done    <= 1'b1;
            state   <= S_END;
          end
        end
        S_END: if (!en_cal) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
endmodule
