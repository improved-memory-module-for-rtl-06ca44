// lsa_codec: protects the Logical Sector Address (LSA) that is written into the
// spare area of every programmed NAND page. Because pages inside a block must
// be programmed in order, the translation layer cannot update a table in
// flash on every write; instead each page carries its own logical address,
// and this address must survive bit errors in the spare area.
//
// Code word: 21 LSA bits + 7 check bits = 28 bits, a SEC-DED code, as in the
// published design. The check bits come from a Hsiao code (secded_codec); the
// code word is packed into four spare bytes, low byte first, with the top
// four bits zero (this packing is this design's choice).
//
// Interface: combinational. lsa -> spare_wr (32 bits for 4 spare bytes);
// spare_rd -> lsa_out, corrected, uncorrectable.
module lsa_codec #(
  parameter int unsigned LSA_W   = 21,
  parameter int unsigned CHECK_W = 7
) (
  input  logic [LSA_W-1:0] lsa,
  output logic [31:0]      spare_wr,
  input  logic [31:0]      spare_rd,
  output logic [LSA_W-1:0] lsa_out,
  output logic             corrected,
  output logic             uncorrectable
);
  localparam int unsigned CW_W = LSA_W + CHECK_W;

  logic [CW_W-1:0] cw_enc;

  secded_codec #(.DATA_W(LSA_W), .CHECK_W(CHECK_W)) u_code (
    .enc_data         (lsa),
    .enc_cw           (cw_enc),
    .dec_cw           (spare_rd[CW_W-1:0]),
    .dec_data         (lsa_out),
    .dec_corrected    (corrected),
    .dec_uncorrectable(uncorrectable)
  );

  assign spare_wr = 32'(cw_enc);

endmodule
