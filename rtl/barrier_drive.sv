// barrier_drive - positions one barrier part with a stepper motor, open loop.
//
// A barrier part has three positions: raised vertical, lowered at 45 degrees,
// lowered horizontal. The motor needs no position sensor: the position is the
// number of steps sent since the raised (home) position, the way a stepper is
// normally used for open-loop positioning. `target` selects the position; the
// block issues one step every STEP_DIV clocks towards it (lowering = forward,
// raising = reverse sequence) until the step count matches, then de-energises
// the coils. A new target can be given at any time, including mid-travel.
// Three positions, the step sequence and open-loop counting follow the
// document; the step counts, step rate and home-at-reset are this design's
// assumptions (100 half steps for 90 degrees, 10 steps/s, so a full travel
// takes 10 s, inside the 20 s gate travel time of the gate model).
//
// Interface: coil[3:0] drives D0..D3 of the ULN2003. at_target is high when the
// arm is at the commanded position; is_raised / is_45 / is_horizontal report
// where the arm is.
// Timing: at 100 MHz the default travel raised->horizontal is 100 steps of
// 10,000,000 clocks.
module barrier_drive
  import lx_pkg::*;
#(
  parameter int unsigned STEP_DIV  = 10_000_000,
  parameter int unsigned STEPS_45  = 50,
  parameter int unsigned STEPS_90  = 100,
  parameter bit          HALF_STEP = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  barrier_pos_e target,
  output logic [3:0]   coil,
  output logic         moving,
  output logic         at_target,
  output logic         is_raised,
  output logic         is_45,
  output logic         is_horizontal
);
  localparam int unsigned PW = $clog2(STEPS_90 + 1);
  localparam int unsigned DW = $clog2(STEP_DIV + 1);

  logic [PW-1:0] pos, goal;
  logic [DW-1:0] div;
  logic          step, dir;

  always_comb begin
    case (target)
      POS_LOWERED45:  goal = PW'(STEPS_45);
      POS_HORIZONTAL: goal = PW'(STEPS_90);
      default:        goal = '0;
    endcase
  end

  assign moving        = (pos != goal);
  assign at_target     = !moving;
  assign dir           = (goal < pos);          // 1 = raising (reverse)
  assign is_raised     = (pos == '0);
  assign is_45         = (pos == PW'(STEPS_45));
  assign is_horizontal = (pos == PW'(STEPS_90));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      step <= 1'b0;
      pos  <= '0;
    end else begin
      step <= 1'b0;
      if (!moving) begin
        div <= '0;
      end else if (div == DW'(STEP_DIV - 1)) begin
        div  <= '0;
        step <= 1'b1;
        pos  <= dir ? pos - 1'b1 : pos + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  // Keep the coils energised while travelling and for the final step.
  logic energise;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) energise <= 1'b0;
    else        energise <= moving | step;
  end

  logic step_dir;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_dir <= 1'b0;
    else if (moving) step_dir <= dir;
  end

  stepper_seq #(.HALF_STEP(HALF_STEP)) u_seq (
    .clk    (clk),
    .rst_n  (rst_n),
    .enable (energise),
    .step   (step),
    .dir    (step_dir),
    .coil   (coil)
  );
endmodule
