// bch_encoder: byte-oriented systematic encoder of the binary BCH code that
// protects each NAND data page: GF(2^15), correction capability t = 15,
// 225 parity bits, 2048 information bytes + 29 parity bytes per code word
// (code rate 0.986), as in the published design.
//
// How it works: the 225-bit remainder register divides the message by the
// generator polynomial g(x) (imm_pkg::BCH_G). Each clock takes one byte,
// most significant bit first, by unrolling eight steps of the bit-serial
// division. After PAGE_B bytes the remainder is emitted as 29 bytes, most
// significant bit first: the 225 bits are left-aligned in 232 and the 7
// padding bits at the end of the last byte are zero.
//
// Interface (no back-pressure on the output):
//   start        : one-cycle pulse, clears the remainder for a new page.
//   in_valid/in_data : information bytes; in_ready is low while parity
//                  bytes are being sent.
//   out_valid/out_data : the code word: each information byte is passed
//                  through in the same cycle, then the 29 parity bytes
//                  follow on consecutive cycles. last marks the final one.
// Throughput: one byte per clock; a page takes PAGE_BYTES + 29 cycles.
module bch_encoder
  import imm_pkg::*;
#(
  parameter int unsigned PAGE_B = PAGE_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       last
);
  localparam int unsigned PB = BCH_PAR_BYTES;
  localparam logic [BCH_PAR-1:0] G = BCH_G[BCH_PAR-1:0];

  logic [BCH_PAR-1:0]  rem_q, rem_d;
  logic [PB*8-1:0]     par_q;               // parity shift register
  logic [$clog2(PAGE_B+1)-1:0] cnt;
  logic [$clog2(PB+1)-1:0]     pcnt;
  logic                par_phase;

  assign in_ready = !par_phase;

  // Eight unrolled steps of LFSR division, MSB first.
  always_comb begin
    logic fb;
    rem_d = rem_q;
    for (int i = 7; i >= 0; i--) begin
      fb    = in_data[i] ^ rem_d[BCH_PAR-1];
      rem_d = {rem_d[BCH_PAR-2:0], 1'b0} ^ (fb ? G : '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q     <= '0;
      par_q     <= '0;
      cnt       <= '0;
      pcnt      <= '0;
      par_phase <= 1'b0;
    end else if (start) begin
      rem_q     <= '0;
      cnt       <= '0;
      pcnt      <= '0;
      par_phase <= 1'b0;
    end else if (par_phase) begin
      par_q <= {par_q[PB*8-9:0], 8'h00};
      pcnt  <= pcnt + 1'b1;
      if (pcnt == ($clog2(PB+1))'(PB - 1)) par_phase <= 1'b0;
    end else if (in_valid) begin
      if (cnt == ($clog2(PAGE_B+1))'(PAGE_B - 1)) begin
        par_q     <= {rem_d, {(PB*8-BCH_PAR){1'b0}}};
        par_phase <= 1'b1;
        cnt       <= '0;
        rem_q     <= '0;
      end else begin
        rem_q <= rem_d;
        cnt   <= cnt + 1'b1;
      end
    end
  end

  assign out_valid = par_phase || in_valid;
  assign out_data  = par_phase ? par_q[PB*8-1 -: 8] : in_data;
  assign last      = par_phase && (pcnt == ($clog2(PB+1))'(PB - 1));

endmodule
