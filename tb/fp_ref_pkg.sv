// fp_ref_pkg: reference conversions between IEEE-754 single precision and
// the simulator's double-precision real, used by the testbenches to work out
// expected results independently of the RTL arithmetic. real_to_f32 rounds
// to nearest even and flushes subnormal results to zero, the policy of the
// floating-point units under test.
package fp_ref_pkg;

  function automatic real f32_to_real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real_to_f32(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'h0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    mr = {1'b0, m} + {24'b0, g & (st | m[0])};
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'h0};
    if (e <= 0)   return {d[63], 31'h0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // Random normal number with a biased exponent in [emin, emax].
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(emin + int'($urandom % (emax - emin + 1))), r[22:0]};
  endfunction

endpackage
