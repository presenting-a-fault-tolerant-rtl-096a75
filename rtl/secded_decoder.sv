// secded_decoder: checks a data word against its SECDED check bits,
// corrects a single error and flags a double error.
//
// It is built from the four parts of the classic SECDED input-buffer
// decoder: a syndrome generator (recomputes the Hamming bits and XORs them
// with the received ones), a syndrome decoder (turns the syndrome into a
// one-hot error vector e over the data bits), the error correction (data
// XOR e) and the error detection (classifies the error from the syndrome
// and the overall parity).
//
//   syndrome == 0, parity ok        : no error
//   parity wrong, syndrome <= N     : single error, corrected (it may sit in
//                                     a check bit, then the data is kept)
//   parity ok, syndrome != 0        : double error, detected
//   parity wrong, syndrome > N      : uncorrectable, reported as double_err
// where N = DATA_W + HAM_W is the Hamming codeword length.
//
// Purely combinational. The configurable correct/detect mode and bypass of
// the baseline SECDED scheme are not part of this decoder: the FTSECDED
// buffer always corrects one error and detects two, as the document asks.
module secded_decoder #(
  parameter int unsigned DATA_W = ft_pkg::DATA_W,
  localparam int unsigned HAM_W   = ft_pkg::hamming_bits(DATA_W),
  localparam int unsigned CHECK_W = HAM_W + 1
) (
  input  logic [DATA_W-1:0]  data_in,
  input  logic [CHECK_W-1:0] check_in,
  output logic [HAM_W-1:0]   syndrome,
  output logic [DATA_W-1:0]  data_out,
  output logic               single_err,
  output logic               double_err
);

  localparam int unsigned N = DATA_W + HAM_W;

  logic              parity_err;
  logic [DATA_W-1:0] err_vec;

  // Syndrome generator.
  always_comb begin
    syndrome = check_in[HAM_W-1:0];
    for (int unsigned i = 0; i < DATA_W; i++) begin
      for (int unsigned k = 0; k < HAM_W; k++) begin
        if (((ft_pkg::data_pos(i) >> k) & 1) == 1) syndrome[k] ^= data_in[i];
      end
    end
    parity_err = (^data_in) ^ (^check_in);
  end

  // Syndrome decoder: one-hot error vector over the data bits.
  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) begin
      err_vec[i] = parity_err && (int'(syndrome) == int'(ft_pkg::data_pos(i)));
    end
  end

  // Error correction.
  assign data_out = data_in ^ err_vec;

  // Error detection.
  always_comb begin
    single_err = parity_err && (int'(syndrome) <= int'(N));
    double_err = (!parity_err && (syndrome != '0)) ||
                 (parity_err && (int'(syndrome) > int'(N)));
  end

endmodule
