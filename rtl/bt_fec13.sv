// Rate 1/3 forward error correction of the Bluetooth packet header (and HV1
// payload): every bit is sent three times, and the receiver takes the
// majority of each group of three.
//
// Both directions are combinational: enc_in -> enc_out (three copies);
// dec_in (one received triplet) -> dec_out (majority) and dec_fix (the
// triplet held a single error that the vote corrected).
module bt_fec13 (
  input  logic       enc_in,
  output logic [2:0] enc_out,
  input  logic [2:0] dec_in,
  output logic       dec_out,
  output logic       dec_fix
);
  assign enc_out = {3{enc_in}};
  assign dec_out = (dec_in[0] & dec_in[1]) | (dec_in[1] & dec_in[2]) | (dec_in[0] & dec_in[2]);
  assign dec_fix = ~((dec_in == 3'b000) | (dec_in == 3'b111));
endmodule
