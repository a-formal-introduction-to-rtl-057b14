// simple_hdl_top: the generated circuits side by side.
//
// Holds the N-bit ALU (new_alu) and two cost-selected adders (adder): a
// small one, for which the ripple-carry structure is cheaper and is chosen,
// and a wide one, for which the propagate-generate structure is chosen. The
// three circuits share nothing; each has its own ports. Everything is
// combinational, as the hardware description language these circuits were
// written in admits no state.
// Defaults: a 32-bit ALU, a 4-bit adder and a 32-bit adder.
module simple_hdl_top #(
  parameter int unsigned ALU_N        = 32,
  parameter int unsigned ADDER_N      = 4,
  parameter int unsigned WIDE_ADDER_N = 32
) (
  input  logic                    alu_c,
  input  logic [ALU_N-1:0]        alu_a,
  input  logic [ALU_N-1:0]        alu_b,
  input  logic [3:0]              alu_op,
  output logic [ALU_N-1:0]        alu_out,
  output logic                    alu_carry,
  output logic                    alu_overflow,

  input  logic                    add_c,
  input  logic [ADDER_N-1:0]      add_a,
  input  logic [ADDER_N-1:0]      add_b,
  output logic [ADDER_N-1:0]      add_sum,
  output logic                    add_cout,

  input  logic                    wadd_c,
  input  logic [WIDE_ADDER_N-1:0] wadd_a,
  input  logic [WIDE_ADDER_N-1:0] wadd_b,
  output logic [WIDE_ADDER_N-1:0] wadd_sum,
  output logic                    wadd_cout
);
  new_alu #(.N(ALU_N)) u_alu (
    .c(alu_c), .a(alu_a), .b(alu_b), .op(alu_op),
    .out(alu_out), .carry(alu_carry), .overflow(alu_overflow)
  );

  adder #(.N(ADDER_N)) u_adder (
    .c(add_c), .a(add_a), .b(add_b), .sum(add_sum), .cout(add_cout)
  );

  adder #(.N(WIDE_ADDER_N)) u_wide_adder (
    .c(wadd_c), .a(wadd_a), .b(wadd_b), .sum(wadd_sum), .cout(wadd_cout)
  );
endmodule
