// ft_tb_pkg: reference model of the SECDED code for the testbenches.
//
// Written independently of the RTL: the Hamming check bits of a word are
// the XOR of the codeword positions (3,5,6,7,9,10,11,12 for an 8-bit word)
// of its set data bits, and the top check bit is the overall parity of
// data and Hamming bits. Only the 8-bit channel is modelled.
package ft_tb_pkg;

  localparam int DPOS [8] = '{3, 5, 6, 7, 9, 10, 11, 12};

  function automatic logic [4:0] ref_check(logic [7:0] d);
    logic [3:0] h;
    h = 4'd0;
    for (int i = 0; i < 8; i++) if (d[i]) h ^= 4'(DPOS[i]);
    return {^{d, h}, h};
  endfunction

endpackage
