// conv_controller: sequencing state machine of the 2D convolver.
//
// The controller waits in S_IDLE for a command from the bus interface and then
// walks through the steps of that command, holding modwait high in every
// state but S_IDLE so that software can poll for completion.
//   * Load coefficients (coeff_load_en): S_LOAD_C0, S_LOAD_C1, S_LOAD_C2, one
//     cycle each, pulse coeff_ld with coeff_sel = 0, 1, 2 so the coefficient
//     register copies the three column registers of the bus interface.
//   * Load sample column (sample_load_en): S_SHIFT pulses sample_shift. A
//     counter of columns shifted since the start of a row saturates at 3; once
//     three columns are in the window the shift is followed by S_CONV, which
//     pulses convolve_en, and S_STORE, the cycle in which the multiplier tree
//     raises result_ready and the result enters the FIFO.
//   * New row (new_row alone): clears the column counter, so the next three
//     columns refill the window before convolution continues.
//   * Sample complete (sample_load_en and new_row together): clears the
//     column counter and ends streaming mode without shifting.
// sample_stream is high while the window is full (three columns loaded), i.e.
// each further column produces one result. Commands are sampled only in
// S_IDLE; the bus interface keeps a command pending until then. If several
// bits are set the priority is sample complete, coefficient load, new row,
// sample load. Timing: a coefficient load keeps modwait high for 3 cycles, a
// shift that completes a window for 3 cycles, any other shift for 1.
// The commands, modwait, sample_stream and the output names follow the
// reference architecture; the states, their timing and the priority are this
// design's own.
module conv_controller
  import conv_pkg::*;
(
  input  logic       clk,
  input  logic       n_rst,
  input  logic       coeff_load_en,
  input  logic       sample_load_en,
  input  logic       new_row,
  output logic       modwait,
  output logic       sample_stream,
  output logic       sample_shift,
  output logic       convolve_en,
  output logic       coeff_ld,
  output logic [1:0] coeff_sel
);

  ctrl_state_t state, state_n;
  logic [1:0]  cols, cols_n;   // sample columns in the window since the row began

  always_comb begin
    state_n = state;
    cols_n  = cols;
    unique case (state)
      S_IDLE: begin
        if (sample_load_en && new_row) begin
          cols_n = '0;                  // sample complete
        end else if (coeff_load_en) begin
          state_n = S_LOAD_C0;
        end else if (new_row) begin
          cols_n = '0;
        end else if (sample_load_en) begin
          state_n = S_SHIFT;
        end
      end
      S_LOAD_C0: state_n = S_LOAD_C1;
      S_LOAD_C1: state_n = S_LOAD_C2;
      S_LOAD_C2: state_n = S_IDLE;
      S_SHIFT: begin
        if (cols == 2'd3) cols_n = cols;
        else              cols_n = cols + 1'b1;
        state_n = (cols >= 2'd2) ? S_CONV : S_IDLE;
      end
      S_CONV:  state_n = S_STORE;
      S_STORE: state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge n_rst) begin
    if (!n_rst) begin
      state <= S_IDLE;
      cols  <= '0;
    end else begin
      state <= state_n;
      cols  <= cols_n;
    end
  end

  always_comb begin
    modwait       = (state != S_IDLE);
    sample_stream = (cols == 2'd3);
    sample_shift  = (state == S_SHIFT);
    convolve_en   = (state == S_CONV);
    coeff_ld      = (state == S_LOAD_C0) || (state == S_LOAD_C1) || (state == S_LOAD_C2);
    unique case (state)
      S_LOAD_C1: coeff_sel = 2'd1;
      S_LOAD_C2: coeff_sel = 2'd2;
      default:   coeff_sel = 2'd0;
    endcase
  end

endmodule
