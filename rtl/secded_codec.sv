// secded_codec: single-error-correcting, double-error-detecting (SEC-DED)
// encoder and decoder for words kept in RAM: the external SRAM buffer and the
// on-chip block RAMs that hold the translation tables. It is also the core of
// the logical-sector-address codec (lsa_codec).
//
// The code is a Hsiao code: every column of the parity-check matrix has odd
// weight. The CHECK_W check bits have the unit columns; data bit j has the
// j-th column of weight 3, 5, ... taken in increasing numeric order. A
// syndrome of odd weight that equals a column marks a single error, which is
// corrected; an even-weight non-zero syndrome, or an odd one that matches no
// column, marks an uncorrectable error. The use of SEC-DED for RAM words is
// the published design's; the Hsiao construction and the default word width
// (8 bits, the width of the SRAM buffer) are this design's choices.
//
// Interface: purely combinational. enc_data -> enc_cw = {check, data};
// dec_cw -> dec_data, dec_corrected (one bit fixed), dec_uncorrectable.
module secded_codec #(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned CHECK_W = 5
) (
  input  logic [DATA_W-1:0]         enc_data,
  output logic [DATA_W+CHECK_W-1:0] enc_cw,
  input  logic [DATA_W+CHECK_W-1:0] dec_cw,
  output logic [DATA_W-1:0]         dec_data,
  output logic                      dec_corrected,
  output logic                      dec_uncorrectable
);

  typedef logic [CHECK_W-1:0] col_t;
  typedef col_t col_arr_t [DATA_W];

  // Columns of the data bits: odd weight >= 3, by increasing weight, then value.
  function automatic col_arr_t data_columns();
    col_arr_t cols;
    int n = 0;
    for (int w = 3; w <= int'(CHECK_W); w += 2)
      for (int v = 0; v < (1 << CHECK_W); v++)
        if ($countones(v) == w && n < int'(DATA_W)) begin
          cols[n] = col_t'(v);
          n++;
        end
    return cols;
  endfunction

  localparam col_arr_t COLS = data_columns();

  initial begin
    // Enough odd-weight columns must exist for the data width.
    assert (2 ** (CHECK_W - 1) - CHECK_W >= DATA_W)
      else $error("secded_codec: CHECK_W too small for DATA_W");
  end

  function automatic col_t check_of(logic [DATA_W-1:0] d);
    col_t c = '0;
    for (int j = 0; j < int'(DATA_W); j++)
      if (d[j]) c ^= COLS[j];
    return c;
  endfunction

  assign enc_cw = {check_of(enc_data), enc_data};

  col_t syn;
  always_comb begin
    logic [DATA_W-1:0] d;
    logic              hit;
    d   = dec_cw[DATA_W-1:0];
    syn = check_of(d) ^ dec_cw[DATA_W+CHECK_W-1:DATA_W];
    hit = 1'b0;
    for (int j = 0; j < int'(DATA_W); j++)
      if (syn == COLS[j]) begin
        d[j] = ~d[j];
        hit  = 1'b1;
      end
    // a unit syndrome is an error in a check bit: data are already right
    if ($countones(syn) == 1) hit = 1'b1;
    dec_data          = d;
    dec_corrected     = (syn != '0) && hit;
    dec_uncorrectable = (syn != '0) && !hit;
  end

endmodule
