// single_m_ctrl: generates the "Single M" window that loads the matched
// filter's reference register.
//
// In the original design the reference samples H(0)..H(M-1) are written once,
// during one pulse width, by a window signal called Single M, and then held.
// This controller is armed by reset or by reload. When armed, it waits for
// pulse_start (high with the first sample of a pulse) and raises single_m
// on that same cycle and for the next M-1 cycles: exactly M shifts, covering
// one pulse width of M samples. It then raises ref_valid and stays idle until
// the next reload. A reload during a load aborts it and re-arms.
//
// The waiting for a pulse start, the reload input and the synchronous,
// active-low reset are choices of this implementation; the original gives
// only the window's purpose and length. single_m is combinational from the
// state and pulse_start.
module single_m_ctrl
  import dmf_pkg::*;
#(
  parameter int unsigned M = M_TAPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic reload,
  input  logic pulse_start,
  output logic single_m,
  output logic ref_valid
);

  typedef enum logic [1:0] {ARMED, LOADING, LOADED} state_e;

  localparam int unsigned CW = $clog2(M + 1);

  state_e        state_q;
  logic [CW-1:0] count_q;   // shifts done so far

  always_comb begin
    single_m  = !reload && ((state_q == ARMED && pulse_start) || state_q == LOADING);
    ref_valid = (state_q == LOADED);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= ARMED;
      count_q <= '0;
    end else if (reload) begin
      state_q <= ARMED;
      count_q <= '0;
    end else begin
      unique case (state_q)
        ARMED: if (pulse_start) begin
          count_q <= CW'(1);
          state_q <= (M == 1) ? LOADED : LOADING;
        end
        LOADING: begin
          count_q <= count_q + CW'(1);
          if (count_q == CW'(M - 1)) state_q <= LOADED;
        end
        default: ;
      endcase
    end
  end

endmodule
