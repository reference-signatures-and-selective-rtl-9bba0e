// cut_model: behavioural model of the circuit under test, for simulation only.
//
// Combinational 8-bit-in, 3-bit-out circuit described in cut_pkg. When
// fault_en is high, net fault_net is stuck at fault_val, so a testbench can
// show that the BIST detects faulty CUTs. The response follows the input
// without delay, as the Test Controller expects.
module cut_model (
  input  logic [7:0] a,
  input  logic       fault_en,
  input  logic [4:0] fault_net,
  input  logic       fault_val,
  output logic [2:0] x
);
  always_comb x = cut_pkg::cut_eval(a, fault_en, int'(fault_net), fault_val);
endmodule
