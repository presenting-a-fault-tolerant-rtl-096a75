// ft_pkg: constants and types shared by the FTSECDED input buffer.
//
// The link between two routers carries one flit per cycle: a DATA_W-bit
// data word (the "Data" of the scheme, stored in virtual channel VC1) and,
// when the sending router had a free virtual channel for it, the SECDED
// check bits of that word (the "Data Check", stored in VC0).
//
// The check bits are an extended Hamming code: HAM_W Hamming parity bits
// plus one overall parity bit, so a single error is corrected and a double
// error is detected. For the 8-bit channel this is a (13,8) code with
// 5 check bits. The channel width of 8 bits follows the document's
// reliability evaluation; the code construction (Hamming positions, overall
// parity in the top check bit) is this design's own choice.
package ft_pkg;

  // Channel (data) width in bits.
  localparam int unsigned DATA_W = 8;

  // Number of Hamming parity bits needed for a data width:
  // the smallest p with 2**p >= dw + p + 1.
  function automatic int unsigned hamming_bits(int unsigned dw);
    int unsigned p;
    p = 1;
    while ((1 << p) < dw + p + 1) p++;
    return p;
  endfunction

  localparam int unsigned HAM_W   = hamming_bits(DATA_W);  // 4 for DATA_W = 8
  localparam int unsigned CHECK_W = HAM_W + 1;              // + overall parity

  // Codeword position (1-based, Hamming numbering) of data bit i: the i-th
  // position that is not a power of two, i.e. i + 1 + p, where p is the
  // number of powers of two not above that position.
  function automatic int unsigned data_pos(int unsigned i);
    int unsigned p;
    p = 0;
    while ((1 << p) <= i + 1 + p) p++;
    return i + 1 + p;
  endfunction

  // One flit on a router-to-router link.
  typedef struct packed {
    logic               chk_valid;  // check bits travel with this flit
    logic [CHECK_W-1:0] check;      // SECDED check bits (0 when !chk_valid)
    logic [DATA_W-1:0]  data;       // payload
  } link_flit_t;

  // Entry of VC0 when it holds check bits: presence flag and the bits.
  typedef struct packed {
    logic               present;
    logic [CHECK_W-1:0] check;
  } check_entry_t;

endpackage
