// lx_pkg - types shared by the level-crossing (LX) controller blocks.
//
// The LX control unit walks through the situations of the crossing listed in
// the state table of the design (initial setting, waiting for a train, checking
// obstacles, checking barrier lowering, checking departure within TIME-OUT,
// checking the approaching request buffer, checking for a faulty situation,
// informing the disaster management force). The warning phases before the
// barriers move (green, yellow, red road aspects timed by t1..t3) are split into
// states of their own here; that split is this design's choice.
// Barrier parts have the three positions the design names: raised vertical,
// lowered 45 degrees, lowered horizontal. LCD message codes follow the texts
// the control unit displays; the LCD itself is external.
package lx_pkg;

  typedef enum logic [3:0] {
    LX_INIT        = 4'd0,   // initial setting
    LX_WAIT_IRQ    = 4'd1,   // wait for interrupt (train approaching request)
    LX_WARN_GREEN  = 4'd2,   // t1: road still flashing green
    LX_WARN_YELLOW = 4'd3,   // t2: road flashing yellow
    LX_WARN_RED    = 4'd4,   // t3: road flashing red, barriers still raised
    LX_CHK_OBST    = 4'd5,   // checking presence of obstacles inside LX (t4)
    LX_CHK_LOWER   = 4'd6,   // checking lowering of the two barrier parts (t5)
    LX_CHK_DEPART  = 4'd7,   // checking for train departure at TIME-OUT
    LX_CHK_BUFFER  = 4'd8,   // checking approaching request buffer
    LX_CHK_FAULT   = 4'd9,   // checking for faulty situation
    LX_INFORM_DMF  = 4'd10   // informing disaster management force
  } lx_state_e;

  typedef enum logic [1:0] {
    POS_RAISED     = 2'd0,
    POS_LOWERED45  = 2'd1,
    POS_HORIZONTAL = 2'd2
  } barrier_pos_e;

  typedef enum logic [3:0] {
    MSG_NO_TRAIN        = 4'd0,  // "No train arriving"
    MSG_TRAIN_ARRIVING  = 4'd1,  // "Train is arriving"
    MSG_OBSTACLE        = 4'd2,  // "The train is coming but there is also an obstacle"
    MSG_TRAIN_INSIDE    = 4'd3,  // "Still the train is inside the LX"
    MSG_SECOND_TRAIN    = 4'd4,  // "Second train is arriving"
    MSG_NOT_LOWERED     = 4'd5,  // "The barrier is not lowered at specified time"
    MSG_NO_FAULT_PASSED = 4'd6,  // "There is no fault and the first train has passed"
    MSG_DISASTER        = 4'd7,  // disaster reported
    MSG_PASSED_OK       = 4'd8   // "Train passed and no disaster"
  } lcd_msg_e;

  // Lamp aspect: off, steady or flashing.
  typedef enum logic [1:0] {
    ASP_OFF   = 2'd0,
    ASP_ON    = 2'd1,
    ASP_FLASH = 2'd2
  } aspect_e;

  typedef struct packed {
    aspect_e green;
    aspect_e yellow;
    aspect_e red;
  } road_aspect_t;

  typedef struct packed {
    aspect_e green;
    aspect_e red;
  } rail_aspect_t;

  // Direction of travel through the crossing.
  typedef enum logic {
    DIR_LR = 1'b0,   // left to right
    DIR_RL = 1'b1    // right to left
  } dir_e;

  // Lamp drive from an aspect and the shared flash square wave.
  function automatic logic lamp(aspect_e a, logic flash_phase);
    case (a)
      ASP_ON:    return 1'b1;
      ASP_FLASH: return flash_phase;
      default:   return 1'b0;
    endcase
  endfunction

endpackage
