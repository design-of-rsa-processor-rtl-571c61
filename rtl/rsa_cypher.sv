// rsa_cypher: RSA modular exponentiation, cypher = indata^inexp mod inmod.
//
// The exponent is scanned from its least significant bit (right-to-left
// binary exponentiation). Two modular multipliers work in parallel: the
// square unit keeps root = indata^(2^i) mod n, and the multiply unit folds
// root into the running result (tempout) whenever exponent bit i is 1. A step
// starts both units (multgo/sqrgo) and waits until both report ready
// (bothrdy). The same module encrypts (exponent e) and decrypts (exponent d).
//
// Before the scan, root = indata*1 mod n and tempout = 1*1 mod n are formed
// by the same units, so indata need not be below n and n = 1 gives 0.
// The scan stops as soon as the remaining exponent bits are all zero.
//
// Interface: ready is high while idle. A one-clock ds pulse while ready
// captures indata, inexp and inmod and starts; ready falls on the next clock
// and rises again with cypher valid, and done pulses for that one clock.
// cypher holds its value until the next result. inmod must be non-zero.
// Latency: (1 + bit length of inexp) multiplier rounds of 2W+5 clocks each.
// The document gives the operation, the port names and the two-unit
// square/multiply structure (in its signal names); the scan order and the
// handshake details are this design's choices.
module rsa_cypher
  import vedic_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter mult_kind_e  MULT = MULT_NIKHILAM
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ds,
  input  logic [W-1:0] indata,
  input  logic [W-1:0] inexp,
  input  logic [W-1:0] inmod,
  output logic [W-1:0] cypher,
  output logic         ready,
  output logic         done
);
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_STEP, S_GAP, S_WAIT} state_e;
  state_e state;

  logic [W-1:0] expreg, modreg, root, tempout, datareg;
  logic         init_phase;
  logic         multgo, sqrgo, multrdy, sqrrdy, bothrdy;
  logic [W-1:0] mult_a, mult_b, sqr_a, sqr_b, mult_r, sqr_r;

  mod_mult #(.W(W), .MULT(MULT)) u_mult (
    .clk(clk), .rst(rst), .go(multgo), .a(mult_a), .b(mult_b), .n(modreg),
    .rdy(multrdy), .r(mult_r)
  );
  mod_mult #(.W(W), .MULT(MULT)) u_sqr (
    .clk(clk), .rst(rst), .go(sqrgo), .a(sqr_a), .b(sqr_b), .n(modreg),
    .rdy(sqrrdy), .r(sqr_r)
  );

  assign bothrdy = multrdy & sqrrdy;

  // Operand selection: during init root <- indata*1 and tempout <- 1*1.
  always_comb begin
    if (init_phase) begin
      mult_a = datareg;  mult_b = W'(1);
      sqr_a  = W'(1);    sqr_b  = W'(1);
    end else begin
      mult_a = tempout;  mult_b = root;
      sqr_a  = root;     sqr_b  = root;
    end
  end

  assign multgo = (state == S_INIT) || (state == S_STEP && expreg[0]);
  assign sqrgo  = (state == S_INIT) || (state == S_STEP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      expreg     <= '0;
      modreg     <= W'(1);
      datareg    <= '0;
      root       <= '0;
      tempout    <= '0;
      cypher     <= '0;
      init_phase <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (ds) begin
          expreg     <= inexp;
          modreg     <= inmod;
          datareg    <= indata;
          init_phase <= 1'b1;
          state      <= S_INIT;
        end
        S_INIT, S_STEP: state <= S_GAP;       // units capture operands
        S_GAP:  state <= S_WAIT;              // rdy falls during this clock
        S_WAIT: if (bothrdy) begin
          if (init_phase) begin
            root       <= mult_r;
            tempout    <= sqr_r;
            init_phase <= 1'b0;
          end else begin
            if (expreg[0]) tempout <= mult_r;
            root   <= sqr_r;
            expreg <= expreg >> 1;
          end
          // Finish when no set exponent bit remains to be processed.
          if ((init_phase && expreg == '0) || (!init_phase && (expreg >> 1) == '0)) begin
            cypher <= init_phase ? sqr_r : (expreg[0] ? mult_r : tempout);
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            state <= S_STEP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);
endmodule
