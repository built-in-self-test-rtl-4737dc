// Sequence state machine of the test pattern generator; it also sets the
// OPMODE of both slices of a DSP tile.
//
// A BIST sequence is four groups of 256 clock cycles. The machine waits in
// IDLE (where `rst`, synchronous, puts it), enters G1 on `start` (from any state), moves to the next group on
// `grp_end` (the last cycle of a group, from the TPG's counter) and stops in
// DONE after G4. Its OPMODE outputs follow the document's table of BIST
// sequences:
//
//   group  multiply    adder (phase 0 / phase 1)   cascade slice 1 / slice 0
//   G1     A*B         Z(C)  / X(P)+Y(C)           A:B+Z(PC)      / Z(C)
//   G2     A*B         Y(C)  / X(P)+Z(C)           A:B+Z(PC>>17)  / Z(C)
//   G3     A*B+C       Z(C)  / Y(C)+Z(P)           Z(C)           / A:B+Z(PC)
//   G4     A:B+C       Y(C)  / Y(C)+Z(P>>17)       Z(C)           / A:B+Z(PC>>17)
//
// In the adder test `phase` (bit 0 of the TPG counter) picks the first or
// second clock cycle of each two-cycle test vector. In IDLE and DONE both
// slices get OPMODE 0 (P = 0). Outputs are decoded from the state (Moore).
module opmode_fsm
  import dsp_bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       grp_end,
  input  test_mode_e mode,
  input  logic       phase,
  output opmode_t    opm0,     // slice 0
  output opmode_t    opm1,     // slice 1
  output logic [1:0] group,    // 0..3 while running
  output logic       running,
  output logic       done
);
  typedef enum logic [2:0] {S_IDLE, S_G1, S_G2, S_G3, S_G4, S_DONE} state_e;
  state_e state, state_d;

  always_ff @(posedge clk) begin
    if (rst)        state <= S_IDLE;
    else if (start) state <= S_G1;
    else       state <= state_d;
  end

  always_comb begin
    state_d = state;
    unique case (state)
      S_G1:    if (grp_end) state_d = S_G2;
      S_G2:    if (grp_end) state_d = S_G3;
      S_G3:    if (grp_end) state_d = S_G4;
      S_G4:    if (grp_end) state_d = S_DONE;
      S_DONE:  state_d = S_DONE;
      default: state_d = S_IDLE;
    endcase
  end

  function automatic opmode_t om(xsel_e x, ysel_e y, zsel_e z);
    return '{z: z, y: y, x: x};
  endfunction

  always_comb begin
    running = state inside {S_G1, S_G2, S_G3, S_G4};
    done    = (state == S_DONE);
    unique case (state)
      S_G2:    group = 2'd1;
      S_G3:    group = 2'd2;
      S_G4:    group = 2'd3;
      default: group = 2'd0;
    endcase
    opm0 = OPM_ZERO;
    opm1 = OPM_ZERO;
    if (running) begin
      unique case (mode)
        TM_MULT: begin
          unique case (group)
            2'd0, 2'd1: opm0 = om(X_M,  Y_M,    Z_ZERO);
            2'd2:       opm0 = om(X_M,  Y_M,    Z_C);
            default:    opm0 = om(X_AB, Y_ZERO, Z_C);
          endcase
          opm1 = opm0;
        end
        TM_ADD: begin
          unique case ({group, phase})
            3'b000:  opm0 = om(X_ZERO, Y_ZERO, Z_C);
            3'b001:  opm0 = om(X_P,    Y_C,    Z_ZERO);
            3'b010:  opm0 = om(X_ZERO, Y_C,    Z_ZERO);
            3'b011:  opm0 = om(X_P,    Y_ZERO, Z_C);
            3'b100:  opm0 = om(X_ZERO, Y_ZERO, Z_C);
            3'b101:  opm0 = om(X_ZERO, Y_C,    Z_P);
            3'b110:  opm0 = om(X_ZERO, Y_C,    Z_ZERO);
            default: opm0 = om(X_ZERO, Y_C,    Z_SP);
          endcase
          opm1 = opm0;
        end
        default: begin  // TM_CASC: the two slices are driven independently
          unique case (group)
            2'd0: begin opm1 = om(X_AB, Y_ZERO, Z_PC);  opm0 = om(X_ZERO, Y_ZERO, Z_C); end
            2'd1: begin opm1 = om(X_AB, Y_ZERO, Z_SPC); opm0 = om(X_ZERO, Y_ZERO, Z_C); end
            2'd2: begin opm1 = om(X_ZERO, Y_ZERO, Z_C); opm0 = om(X_AB, Y_ZERO, Z_PC);  end
            default: begin opm1 = om(X_ZERO, Y_ZERO, Z_C); opm0 = om(X_AB, Y_ZERO, Z_SPC); end
          endcase
        end
      endcase
    end
  end
endmodule
