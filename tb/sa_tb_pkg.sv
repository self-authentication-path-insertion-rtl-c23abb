// Testbench helpers for the self-authenticating fabric.
//
// auth_table() builds the authentication table that matches a LUT table
// under a given input permutation: the authentication module sees input j
// as LUT input perm[j], so for every LUT minterm i its address is
// a(i) = sum_j bit(i, perm[j]) << j, and table bit a(i) must equal LUT bit i.
// rand_perm() draws a random permutation of 0..K-1.
package sa_tb_pkg;

  localparam int MAXK = 6;

  function automatic int perm_addr(int i, int k, int perm[MAXK]);
    int a = 0;
    for (int j = 0; j < k; j++) a |= ((i >> perm[j]) & 1) << j;
    return a;
  endfunction

  function automatic logic [63:0] auth_table(logic [63:0] t, int k, int perm[MAXK]);
    logic [63:0] a = '0;
    for (int i = 0; i < (1 << k); i++) a[perm_addr(i, k, perm)] = t[i];
    return a;
  endfunction

  function automatic void rand_perm(int k, output int perm[MAXK]);
    for (int j = 0; j < MAXK; j++) perm[j] = j;
    for (int j = k - 1; j > 0; j--) begin
      int r = int'($urandom_range(j, 0));
      int tmp = perm[j];
      perm[j] = perm[r];
      perm[r] = tmp;
    end
  endfunction

endpackage
