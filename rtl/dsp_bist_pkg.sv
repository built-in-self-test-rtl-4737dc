// Shared types and constants for the DSP-slice built-in self-test.
//
// The DSP slice under test has 18-bit A and B ports, a 48-bit C port, a
// 48-bit P result, a 7-bit OPMODE that steers the X, Y and Z multiplexers,
// and 17 control pins (carry-in, subtract, clock enables and resets). The
// port widths, the 17-bit shift of the P and PC feedback paths and the count
// of control pins follow the document; the OPMODE encoding and the grouping
// of the control pins into clock enables and resets are this design's own
// choice, modelled on the usual DSP48 conventions.
//
// The package also holds the five BIST configurations of the slices (number
// of pipeline registers, active level of the control pins, source of B) as a
// function, so that a test sequencer can "download" them one after another.
package dsp_bist_pkg;

  localparam int unsigned A_W      = 18;  // A port width
  localparam int unsigned B_W      = 18;  // B port width
  localparam int unsigned AB_W     = A_W + B_W;  // A:B concatenation
  localparam int unsigned D_W      = 48;  // C, P, PC and adder width
  localparam int unsigned SHIFT    = 17;  // ShiftP / ShiftPC amount
  localparam int unsigned CTRL_W   = 17;  // control pins per slice
  localparam int unsigned OPMODE_W = 7;
  localparam int unsigned SEQ_LEN  = 1024; // clock cycles per BIST sequence
  localparam int unsigned GRP_LEN  = 256;  // clock cycles per group

  // X multiplexer: 0, multiplier row 0, P feedback, A:B
  typedef enum logic [1:0] {
    X_ZERO = 2'b00, X_M = 2'b01, X_P = 2'b10, X_AB = 2'b11
  } xsel_e;

  // Y multiplexer: 0, multiplier row 1, C
  typedef enum logic [1:0] {
    Y_ZERO = 2'b00, Y_M = 2'b01, Y_RSV = 2'b10, Y_C = 2'b11
  } ysel_e;

  // Z multiplexer: 0, PC, P, C, PC>>17, P>>17
  typedef enum logic [2:0] {
    Z_ZERO = 3'b000, Z_PC = 3'b001, Z_P = 3'b010, Z_C = 3'b011,
    Z_RSV4 = 3'b100, Z_SPC = 3'b101, Z_SP = 3'b110, Z_RSV7 = 3'b111
  } zsel_e;

  typedef struct packed {
    zsel_e z;
    ysel_e y;
    xsel_e x;
  } opmode_t;

  localparam opmode_t OPM_ZERO = '{z: Z_ZERO, y: Y_ZERO, x: X_ZERO};

  // The 17 control pins of one slice, in their logical (active-high) sense.
  typedef struct packed {
    logic ce_a, ce_b, ce_c, ce_m, ce_p, ce_ctrl, ce_cinsub, ce_carryin;
    logic rst_a, rst_b, rst_c, rst_m, rst_p, rst_ctrl, rst_carryin;
    logic subtract;
    logic carryin;
  } dsp_ctrl_t;

  localparam dsp_ctrl_t CTRL_IDLE = '{
    ce_a: 1'b1, ce_b: 1'b1, ce_c: 1'b1, ce_m: 1'b1, ce_p: 1'b1,
    ce_ctrl: 1'b1, ce_cinsub: 1'b1, ce_carryin: 1'b1, default: 1'b0};

  // Configuration-memory bits of one slice.
  typedef struct packed {
    logic [1:0] areg;      // 0, 1 or 2 A pipeline registers
    logic [1:0] breg;      // 0, 1 or 2 B pipeline registers
    logic       creg;      // C register
    logic       mreg;      // multiplier output register
    logic       preg;      // P register on the P port
    logic       ctrlreg;   // OPMODE, SUBTRACT and CARRYIN registers
    logic       ctrl_low;  // control pins are active low
    logic       b_cascade; // B taken from BCIN instead of the B port
  } dsp_cfg_t;

  // The three BIST sequences the test pattern generator can run.
  typedef enum logic [1:0] {
    TM_MULT = 2'd0, TM_ADD = 2'd1, TM_CASC = 2'd2
  } test_mode_e;

  localparam int unsigned N_CONFIGS = 5;

  // BIST configuration n (1..5) for slice s (0 or 1).
  function automatic dsp_cfg_t bist_config(int unsigned n, int unsigned s);
    dsp_cfg_t c;
    c = '0;
    if (n < 1 || n > N_CONFIGS) $error("bist_config: no configuration %0d", n);
    unique case (n)
      1: ;                                   // all registers 0, active high
      2: begin                               // all registers 1, active high
        c.areg = 2'd1; c.breg = 2'd1; c.creg = 1'b1; c.mreg = 1'b1;
        c.preg = 1'b1; c.ctrlreg = 1'b1;
      end
      3: begin                               // A/B 2, others 1, active low
        c.areg = 2'd2; c.breg = 2'd2; c.creg = 1'b1; c.mreg = 1'b1;
        c.preg = 1'b1; c.ctrlreg = 1'b1; c.ctrl_low = 1'b1;
      end
      4: begin                               // P 1, others 0; slice 1 cascades B
        c.preg = 1'b1; c.b_cascade = (s == 1);
      end
      default: begin                         // 5: P 1, others 0, active low; slice 0 cascades B
        c.preg = 1'b1; c.ctrl_low = 1'b1; c.b_cascade = (s == 0);
      end
    endcase
    return c;
  endfunction

  // Number of BIST sequences run in configuration n, and the test mode of
  // the k-th of them (k = 0 or 1).
  function automatic int unsigned config_runs(int unsigned n);
    return (n == 2 || n == 3) ? 2 : 1;
  endfunction

  function automatic test_mode_e config_mode(int unsigned n, int unsigned k);
    unique case (n)
      1:       return TM_MULT;
      2, 3:    return (k == 0) ? TM_MULT : TM_ADD;
      default: return TM_CASC;
    endcase
  endfunction

endpackage
