// trivium_ref_pkg: bit-level reference model of Trivium for the testbenches.
// It follows the cipher's published pseudocode literally, with the state
// held as an array s[1..288] of single bits, independent of how the RTL
// packs or slices its state vector. load() places the 80-bit key in
// s1..s80 (key bit 0 in s1), the 80-bit IV in s94..s173 (IV bit 0 in s94)
// and ones in s286..s288; step() returns one key-stream bit and updates the
// state. word() collects n bits with the first one in the MSB.
package trivium_ref_pkg;
  class trivium_ref;
    bit s[1:288];

    function void load(bit [79:0] key, bit [79:0] iv);
      foreach (s[i]) s[i] = 1'b0;
      for (int i = 0; i < 80; i++) begin
        s[i + 1]  = key[i];
        s[i + 94] = iv[i];
      end
      s[286] = 1'b1; s[287] = 1'b1; s[288] = 1'b1;
    endfunction

    function void set_vec(bit [287:0] v);
      for (int i = 1; i <= 288; i++) s[i] = v[i - 1];
    endfunction

    function bit [287:0] get_vec();
      bit [287:0] v;
      for (int i = 1; i <= 288; i++) v[i - 1] = s[i];
      return v;
    endfunction

    function bit step();
      bit t1, t2, t3, z;
      t1 = s[66] ^ s[93];
      t2 = s[162] ^ s[177];
      t3 = s[243] ^ s[288];
      z  = t1 ^ t2 ^ t3;
      t1 = t1 ^ (s[91] & s[92]) ^ s[171];
      t2 = t2 ^ (s[175] & s[176]) ^ s[264];
      t3 = t3 ^ (s[286] & s[287]) ^ s[69];
      for (int i = 93; i > 1; i--)    s[i] = s[i - 1];
      s[1] = t3;
      for (int i = 177; i > 94; i--)  s[i] = s[i - 1];
      s[94] = t1;
      for (int i = 288; i > 178; i--) s[i] = s[i - 1];
      s[178] = t2;
      return z;
    endfunction

    function bit [63:0] word(int n);
      bit [63:0] w = '0;
      for (int i = 0; i < n; i++) w = {w[62:0], step()};
      return w;
    endfunction

    function void init();
      for (int i = 0; i < 1152; i++) void'(step());
    endfunction
  endclass
endpackage
