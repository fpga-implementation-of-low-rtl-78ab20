// Reference model of the decoder's arithmetic for the testbenches, written
// separately from the RTL: the base matrix as dense rows, the circulant shift
// P = ((i-1)*j) mod L for 1-based base position (i, j), the f(x) table, and
// check and variable node updates on plain integers.
package ldpc_ref_pkg;

  localparam int MBR = 18;
  localparam int NBR = 36;

  // Dense base matrix, row i, character j = column j.
  localparam string H_ROWS [MBR] = '{
    "000011100000000001000000100000001000",
    "000101000000101000000010000000000010",
    "010000100000100001000000000100000001",
    "001000000110000000000000010000010100",
    "000000010011000000000000000011000001",
    "000000000001000100011000001100000000",
    "011000000000000000000000000001101001",
    "000000001000010000000011000010010000",
    "110100000000000001000001100000000000",
    "000000001100000100100001001000000000",
    "000000000010000000101000010000010010",
    "000000000000000000010000010110100100",
    "001010000100000010001100000000000000",
    "000000010001010000000100101000000000",
    "100100000000011110000000000000000000",
    "100011100000100000000000000000100000",
    "000000000000001010100110000000000010",
    "000000011000000000010000000001001100"
  };

  function automatic bit h_at(int i, int j);
    string s = H_ROWS[i];
    return s[j] == "1";
  endfunction

  function automatic int shift_ref(int i, int j, int l);
    return ((i + 1 - 1) * (j + 1)) % l;
  endfunction

  // 32 * ln(coth(x/64)), rounded, for a 5-fractional-bit magnitude x.
  function automatic int f_ref(int x);
    real h, v;
    if (x <= 0) return 127;
    if (x >= 170) return 0;
    h = real'(x) / 64.0;
    v = 32.0 * $ln((($exp(h) + $exp(-h)) / ($exp(h) - $exp(-h))));
    if (v > 127.0) return 127;
    return $rtoi(v + 0.5);
  endfunction

  // Signed value of an 8-bit sign-magnitude message.
  function automatic int sm_val(logic [7:0] m);
    return m[7] ? -int'(m[6:0]) : int'(m[6:0]);
  endfunction

  // Variable-to-check message from gamma (VNU semantics).
  function automatic logic [7:0] v2c_of(int gamma);
    int a = (gamma < 0) ? -gamma : gamma;
    if (a > 255) a = 255;
    return {gamma < 0, 7'(f_ref(a))};
  endfunction

  // Check-to-variable message from the other five magnitudes' sum and sign.
  function automatic logic [7:0] c2v_of(int mag_sum, bit sgn);
    if (mag_sum > 511) mag_sum = 511;
    return {sgn, 7'(f_ref(mag_sum))};
  endfunction

endpackage
