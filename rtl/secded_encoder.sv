// secded_encoder: computes the SECDED check bits of a data word.
//
// This is the "compute DataCheck" half of the Decoder & Encoder unit: when
// a flit arrives without check bits, or after a single error has been
// corrected, the check bits sent on to the next router are computed here.
//
// Check bit k (k < HAM_W) is the XOR of the data bits whose Hamming
// codeword position has bit k set; the top check bit is the overall parity
// of the data and the Hamming bits, which lets the decoder tell single from
// double errors. Purely combinational.
//
// Ports: data (DATA_W) in, check (HAM_W+1) out.
// The code layout is this design's choice; the document only says that
// the check bits are computed from the original data.
module secded_encoder #(
  parameter int unsigned DATA_W = ft_pkg::DATA_W,
  localparam int unsigned HAM_W   = ft_pkg::hamming_bits(DATA_W),
  localparam int unsigned CHECK_W = HAM_W + 1
) (
  input  logic [DATA_W-1:0]  data,
  output logic [CHECK_W-1:0] check
);

  logic [HAM_W-1:0] ham;

  always_comb begin
    ham = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      for (int unsigned k = 0; k < HAM_W; k++) begin
        if (((ft_pkg::data_pos(i) >> k) & 1) == 1) ham[k] ^= data[i];
      end
    end
    check = {(^data) ^ (^ham), ham};
  end

endmodule
