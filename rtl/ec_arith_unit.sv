// ec_arith_unit: elliptic-curve arithmetic unit (point addition and point
// doubling) of the dual-field processor.
//
// A microcode sequencer walks the program that ecc_pkg::prog_entry selects
// for the requested field and operation. For every microinstruction it reads
// the two source words from the register file, starts the dual-field ALU
// (whose multiplier is the Urdhva-Tiryagbhyam array), waits for its done and
// writes the result word back; F_END finishes the program.
//
// Interface: start pulses with field and op valid (captured); the operands
// must already be in the register file. busy is high until done pulses for
// one clock, at which point the result words are in the register file.
// Per microinstruction: 1 issue clock plus the ALU latency (1 clock linear,
// 2W+3 clocks multiply) plus 1 write-back clock.
// The four programs transcribe the document's point formulas; the
// microcoded single-ALU organisation is this design's choice.
module ec_arith_unit
  import vedic_pkg::*;
  import ecc_pkg::*;
#(
  parameter int unsigned  W        = 192,
  parameter int unsigned  BIN_M    = 163,
  parameter logic [W:0]   BIN_POLY = (W+1)'(164'h8_0000_0000_0000_0000_0000_0000_0000_0000_0000_00c9),
  parameter logic [W-1:0] PRIME_P  = W'(192'hffffffff_ffffffff_ffffffff_fffffffe_ffffffff_ffffffff),
  parameter int unsigned  DIGIT    = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  field_e       field,
  input  ec_op_e       op,
  // register file access
  output logic [3:0]   raddr_a,
  output logic [3:0]   raddr_b,
  input  logic [W-1:0] rdata_a,
  input  logic [W-1:0] rdata_b,
  output logic         we,
  output logic [3:0]   waddr,
  output logic [W-1:0] wdata,
  // status
  output logic         busy,
  output logic         done
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e  state;
  logic [6:0] pc;
  field_e  field_q;
  uinstr_t ins;
  logic    alu_start, alu_busy, alu_done;
  logic [W-1:0] alu_z;

  assign ins     = ucode(pc);
  assign raddr_a = ins.s1;
  assign raddr_b = ins.s2;

  assign alu_start = (state == S_ISSUE) && (ins.op != F_END);

  field_alu #(.W(W), .BIN_M(BIN_M), .BIN_POLY(BIN_POLY), .PRIME_P(PRIME_P), .DIGIT(DIGIT)) u_alu (
    .clk(clk), .rst(rst), .start(alu_start), .op(ins.op), .field(field_q),
    .x(rdata_a), .y(rdata_b), .busy(alu_busy), .done(alu_done), .z(alu_z)
  );

  assign we    = (state == S_WAIT) && alu_done;
  assign waddr = ins.d;
  assign wdata = alu_z;
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      pc      <= '0;
      field_q <= FIELD_BINARY;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pc      <= prog_entry(field, op);
          field_q <= field;
          state   <= S_ISSUE;
        end
        S_ISSUE: if (ins.op == F_END) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end else begin
          state <= S_WAIT;
        end
        S_WAIT: if (alu_done) begin
          pc    <= pc + 7'd1;
          state <= S_ISSUE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_alu_busy;
  assign unused_alu_busy = alu_busy;
endmodule
