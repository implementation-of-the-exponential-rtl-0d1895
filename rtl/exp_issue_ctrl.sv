// Issue control of the exponential and of multiplications.
//
// Tracks which of its first six cycles the exponential in flight is in, and
// from that decides what may start in the next cycle. Every operation uses the
// multiplier array in one cycle and then the adder and the rounder in the two
// following cycles, so the only structural hazard is the multiplier array.
// The exponential uses it in its cycles 2, 3, 4, 5 and 7 (the cycles after
// the first stage loads new operands, in cycles 1, 2, 3, 4 and 6). Hence:
//   - a multiplication may start when the array is free in the next cycle,
//     that is in the exponential's cycle 1 or 6 (or with no exponential);
//   - a new exponential may start when none is in cycles 1-5 next cycle, so
//     its cycle 1 can coincide with the previous one's cycle 7, giving one
//     exponential every six cycles.
// Consequences: with exponentials back to back, one multiplication fits in
// each six-cycle period (the exponential's cycle 6); a single exponential in
// a chain of multiplications holds the chain for five cycles. The method's
// own summary is more optimistic (two multiplications per period, a four-cycle
// stall); the cycle diagram it gives does not leave room for that, and this
// control follows the diagram.
// The schedule is the method's cycle diagram; the ready/valid handshake and
// the separate issue ports for the two operations are this design's choices.
//
// Interface: exp_valid/exp_ready and mul_valid/mul_ready handshakes (a
// transfer happens when both are high at a clock edge; both may fire in the
// same cycle). phase is the exponential's cycle now; s1_load says the first
// stage loads the array's operands at the end of this cycle.
module exp_issue_ctrl
  import exp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   exp_valid,
  output logic   exp_ready,
  input  logic   mul_valid,
  output logic   mul_ready,
  output logic   exp_fire,
  output logic   mul_fire,
  output phase_e phase,
  output logic   s1_load
);

  assign exp_ready = (phase == PH_IDLE) || (phase == PH_C6);
  assign mul_ready = (phase == PH_IDLE) || (phase == PH_C5);
  assign exp_fire  = exp_valid && exp_ready;
  assign mul_fire  = mul_valid && mul_ready;
  assign s1_load   = (phase inside {PH_DG, PH_T, PH_P, PH_C4, PH_C6});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
    end else if (exp_fire) begin
      phase <= PH_DG;
    end else begin
      unique case (phase)
        PH_IDLE: phase <= PH_IDLE;
        PH_DG:   phase <= PH_T;
        PH_T:    phase <= PH_P;
        PH_P:    phase <= PH_C4;
        PH_C4:   phase <= PH_C5;
        PH_C5:   phase <= PH_C6;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // A multiplication must never meet the exponential in the array.
  logic s1_load_q, mul_fire_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_load_q  <= 1'b0;
      mul_fire_q <= 1'b0;
    end else begin
      s1_load_q  <= s1_load;
      mul_fire_q <= mul_fire;
    end
  end
  a_array_free: assert property (@(posedge clk) disable iff (!rst_n) !(s1_load_q && mul_fire_q));

endmodule
