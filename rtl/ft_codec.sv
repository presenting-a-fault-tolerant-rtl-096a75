// ft_codec: the Decoder & Encoder unit of the FTSECDED input buffer.
//
// It sees the head of VC1 (data) and VC0 (check bits and a flag saying
// whether check bits arrived with the flit from the previous router).
//
//  * check bits arrived: the data is decoded. A single error is corrected;
//    a double error raises error_resist, which makes the port request a
//    retransmission from the previous router.
//  * no check bits arrived: the data cannot be checked and is taken as is.
//
// In both cases the encoder computes fresh check bits of the (corrected)
// data, so enc_data/enc_check form a valid codeword for the next router.
// use_codec is MUX1's select: 0 lets the stored data and check bits pass
// unchanged (check bits arrived and no error was found, so they need not
// be computed again), 1 takes this unit's output.
// Purely combinational. Forwarding the received check bits untouched when
// they are clean follows the document; re-encoding after a correction is
// this design's choice.
module ft_codec
  import ft_pkg::*;
(
  input  logic [DATA_W-1:0]  data,
  input  logic [CHECK_W-1:0] check,
  input  logic               check_present,
  output logic [DATA_W-1:0]  enc_data,
  output logic [CHECK_W-1:0] enc_check,
  output logic               corrected,
  output logic               error_resist,
  output logic               use_codec
);

  logic [DATA_W-1:0] dec_data;
  logic              single_err, double_err;

  secded_decoder #(.DATA_W(DATA_W)) u_dec (
    .data_in   (data),
    .check_in  (check),
    .syndrome  (),
    .data_out  (dec_data),
    .single_err(single_err),
    .double_err(double_err)
  );

  assign enc_data = check_present ? dec_data : data;

  secded_encoder #(.DATA_W(DATA_W)) u_enc (
    .data (enc_data),
    .check(enc_check)
  );

  assign corrected    = check_present && single_err;
  assign error_resist = check_present && double_err;
  assign use_codec    = !check_present || single_err || double_err;

endmodule
