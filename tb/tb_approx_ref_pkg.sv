// Reference truth tables and a bit-serial reference adder for the testbenches.
//
// Each table lists a cell's output for the input rows {A,B,Cin} = 000, 001,
// ..., 111, written out row by row from the published truth table of the
// accurate and approximate full adders. ref_add ripples a carry through
// those tables one bit at a time, exactly as the hardware chain should, and
// never looks at the RTL.
package tb_approx_ref_pkg;

  typedef bit tt_t [8];

  localparam tt_t ACC_S  = '{0, 1, 1, 0, 1, 0, 0, 1};
  localparam tt_t ACC_C  = '{0, 0, 0, 1, 0, 1, 1, 1};
  localparam tt_t AMA1_S = '{0, 1, 0, 0, 0, 0, 0, 1};
  localparam tt_t AMA1_C = '{0, 0, 1, 1, 0, 1, 1, 1};
  localparam tt_t AMA2_S = '{1, 1, 0, 0, 1, 0, 0, 0};
  localparam tt_t AMA2_C = '{0, 0, 1, 1, 0, 1, 1, 1};
  localparam tt_t AMA3_S = '{0, 0, 1, 1, 0, 0, 1, 1};
  localparam tt_t AMA3_C = '{0, 0, 0, 0, 1, 1, 1, 1};

  // kind: 0 accurate, 1..3 AMA1..AMA3
  function automatic bit tt_sum(int kind, int row);
    case (kind)
      1:       return AMA1_S[row];
      2:       return AMA2_S[row];
      3:       return AMA3_S[row];
      default: return ACC_S[row];
    endcase
  endfunction

  function automatic bit tt_carry(int kind, int row);
    case (kind)
      1:       return AMA1_C[row];
      2:       return AMA2_C[row];
      3:       return AMA3_C[row];
      default: return ACC_C[row];
    endcase
  endfunction

  // Result {cout, sum} of a width-bit adder with approximate cells of the
  // given kind on its low approx_bits bits. carry_mid returns the carry into
  // bit approx_bits, i.e. from the approximate into the accurate part.
  function automatic longint unsigned ref_add(int kind, int width, int approx_bits,
                                              longint unsigned a, longint unsigned b,
                                              output bit carry_mid);
    longint unsigned r = 0;
    bit c = 0;
    carry_mid = 0;
    for (int i = 0; i < width; i++) begin
      int row = {29'd0, a[i], b[i], c};
      int k   = (i < approx_bits) ? kind : 0;
      if (i == approx_bits) carry_mid = c;
      r[i] = tt_sum(k, row);
      c    = tt_carry(k, row);
    end
    r[width] = c;
    return r;
  endfunction

endpackage
