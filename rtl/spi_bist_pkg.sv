// spi_bist_pkg - frame schedule shared by the SPI master and the BIST comparator.
//
// A frame is driven by a 7-bit step counter (SD_COUNTER). Step 0 is idle,
// step 1 selects the slave, then three bytes follow, each sent MSB first and
// each followed by one step without a clock:
//
//   step  0        idle, slave deselected
//   step  1        start: slave selected, no clock
//   steps 2..9     control byte, bit 7 down to bit 0
//   step  10       gap
//   steps 11..18   status-address byte, bit 7 down to bit 0
//   step  19       gap
//   steps 20..27   data byte, bit 7 down to bit 0
//   step  28       gap, received data byte is latched
//   step  29       done, slave deselected, counter holds until GO falls
//
// The three fields, their order and the last step value 0x1D follow the
// counter values of the reference normal-mode simulation (control byte,
// then status address, then data byte, counter running from 0 to 0x1D).
// Where exactly each bit sits within that count is this design's choice.
package spi_bist_pkg;

  localparam int unsigned CNT_W = 7;  // SD_COUNTER<6:0>

  typedef logic [CNT_W-1:0] step_t;

  localparam step_t STEP_IDLE  = step_t'(0);
  localparam step_t STEP_START = step_t'(1);
  localparam step_t STEP_CTRL  = step_t'(2);   // first control bit
  localparam step_t STEP_STAT  = step_t'(11);  // first status-address bit
  localparam step_t STEP_DATA  = step_t'(20);  // first data bit
  localparam step_t STEP_LATCH = step_t'(28);  // gap after the data byte
  localparam step_t STEP_DONE  = step_t'(29);  // 0x1D, end of frame

  // Which byte of the frame a step belongs to.
  typedef enum logic [1:0] {
    FIELD_NONE,
    FIELD_CTRL,
    FIELD_STAT,
    FIELD_DATA
  } field_e;

  // Decoded meaning of one step.
  typedef struct packed {
    field_e      field;  // FIELD_NONE on start, gap, idle and done steps
    logic [2:0]  bit_ix; // bit of the byte on the line (7 = MSB, sent first)
  } slot_t;

  function automatic slot_t decode_step(step_t s);
    slot_t r;
    r.field  = FIELD_NONE;
    r.bit_ix = 3'd0;
    if (s >= STEP_CTRL && s < STEP_CTRL + step_t'(8)) begin
      r.field  = FIELD_CTRL;
      r.bit_ix = ~3'(s - STEP_CTRL);
    end else if (s >= STEP_STAT && s < STEP_STAT + step_t'(8)) begin
      r.field  = FIELD_STAT;
      r.bit_ix = ~3'(s - STEP_STAT);
    end else if (s >= STEP_DATA && s < STEP_DATA + step_t'(8)) begin
      r.field  = FIELD_DATA;
      r.bit_ix = ~3'(s - STEP_DATA);
    end
    return r;
  endfunction

  // The bit a frame carries at a step, given the three bytes.
  function automatic logic frame_bit(slot_t sl, logic [7:0] ctrl,
                                     logic [7:0] stat, logic [7:0] data);
    unique case (sl.field)
      FIELD_CTRL: return ctrl[sl.bit_ix];
      FIELD_STAT: return stat[sl.bit_ix];
      FIELD_DATA: return data[sl.bit_ix];
      default:    return 1'b0;
    endcase
  endfunction

endpackage
