// ecc_main_ctrl: main control unit of the dual-field ECC processor.
//
// Holds the field-select control (sel_field: 1 = prime field, 0 = binary
// field) and the requested operation for the duration of a run. On start it
// loads the operands into the register file in one clock, starts the
// elliptic-curve arithmetic unit with the latched field and operation, and
// reports completion.
//
// Interface: start is accepted while busy is low; sel_field, op and the
// operands (point coordinates and a, b) are sampled on that clock only.
// done pulses for one clock after the arithmetic unit finishes; the result
// words are then in the register file and stay there until the next start.
// Overhead: 2 clocks before and 1 clock after the arithmetic unit's run.
// The field-select role follows the document; the load-then-run sequence is
// this design's choice.
module ecc_main_ctrl
  import vedic_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   sel_field,
  input  ec_op_e op,
  // register file load strobe
  output logic   rf_load,
  // arithmetic unit control
  output logic   au_start,
  output field_e au_field,
  output ec_op_e au_op,
  input  logic   au_done,
  // status
  output logic   busy,
  output logic   done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_e;
  state_e state;

  assign rf_load  = (state == S_IDLE) && start;
  assign au_start = (state == S_LOAD);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      au_field <= FIELD_BINARY;
      au_op    <= EC_ADD;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          au_field <= sel_field ? FIELD_PRIME : FIELD_BINARY;
          au_op    <= op;
          state    <= S_LOAD;
        end
        S_LOAD: state <= S_RUN;
        S_RUN:  if (au_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
