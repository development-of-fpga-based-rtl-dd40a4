// stepper_seq - coil sequence for a four-phase unipolar stepper motor.
//
// The outputs D0..D3 go through a ULN2003 Darlington array to the four motor
// windings. Each `step` pulse advances one position in the sequence; `dir`
// selects the order (0 = forward, 1 = reverse, i.e. the sequence sent in
// reverse order, which turns the motor the other way). With HALF_STEP = 0 the
// full-step sequence energises one winding at a time (1000, 0100, 0010, 0001 on
// D0..D3); with HALF_STEP = 1 the half-step sequence inserts the two-winding
// positions between them (1000, 1100, 0100, 0110, 0010, 0011, 0001, 1001).
// Both tables are the document's. `enable` = 0 de-energises all coils; the
// sequence position is kept, which is this design's choice.
//
// Timing: coil changes two clocks after the step pulse (index register, then
// output register). The index starts at the
// first row of the table after reset.
module stepper_seq #(
  parameter bit HALF_STEP = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       step,
  input  logic       dir,
  output logic [3:0] coil      // coil[0] = D0 ... coil[3] = D3
);
  logic [2:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
    end else if (enable && step) begin
      if (HALF_STEP) idx <= dir ? idx - 3'd1 : idx + 3'd1;
      else           idx <= {1'b0, (dir ? idx[1:0] - 2'd1 : idx[1:0] + 2'd1)};
    end
  end

  // Table row for the current index, written as {D3,D2,D1,D0}.
  logic [3:0] pattern;
  always_comb begin
    if (HALF_STEP) begin
      case (idx)
        3'd0: pattern = 4'b0001;
        3'd1: pattern = 4'b0011;
        3'd2: pattern = 4'b0010;
        3'd3: pattern = 4'b0110;
        3'd4: pattern = 4'b0100;
        3'd5: pattern = 4'b1100;
        3'd6: pattern = 4'b1000;
        default: pattern = 4'b1001;
      endcase
    end else begin
      case (idx[1:0])
        2'd0: pattern = 4'b0001;
        2'd1: pattern = 4'b0010;
        2'd2: pattern = 4'b0100;
        default: pattern = 4'b1000;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coil <= 4'b0000;
    else        coil <= enable ? pattern : 4'b0000;
  end
endmodule
