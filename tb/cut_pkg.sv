// cut_pkg: gate-level description of the example circuit under test used by
// the testbenches, with single stuck-at fault injection.
//
// The BIST is built for a custom 8-input, 3-output combinational CUT whose
// gates are not part of this RTL. For simulation this package defines a
// small stand-in circuit of 17 nets (8 inputs, 9 gates):
//   n8  = a0 & a1     n9  = a2 | a3     n10 = a4 ^ a5    n11 = a6 & a7
//   n12 = n8 | n9     n13 = n10 & n11   n14 = n9 ^ n10
//   n15 = n13 | n8    n16 = n14 ^ n11
//   response x = {n16, n15, n12}
// cut_eval() computes the response with net fnet stuck at fval when fen is
// set, so the testbenches can derive the truth table, the RD/NRD split and
// the fault list exactly as the BIST expects them to be prepared offline.
package cut_pkg;

  localparam int N_NETS   = 17;
  localparam int N_FAULTS = 2 * N_NETS;  // stuck-at-0 and stuck-at-1 per net

  function automatic logic [2:0] cut_eval(logic [7:0] a, bit fen, int fnet, bit fval);
    logic [N_NETS-1:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) begin
      n[i] = a[i];
      if (fen && fnet == i) n[i] = fval;
    end
    for (int g = 8; g < N_NETS; g++) begin
      case (g)
        8:  n[g] = n[0] & n[1];
        9:  n[g] = n[2] | n[3];
        10: n[g] = n[4] ^ n[5];
        11: n[g] = n[6] & n[7];
        12: n[g] = n[8] | n[9];
        13: n[g] = n[10] & n[11];
        14: n[g] = n[9] ^ n[10];
        15: n[g] = n[13] | n[8];
        default: n[g] = n[14] ^ n[11];
      endcase
      if (fen && fnet == g) n[g] = fval;
    end
    return {n[16], n[15], n[12]};
  endfunction

endpackage
