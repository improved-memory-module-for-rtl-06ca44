// fault_injector: test utility that sits on the NAND flash data bus and flips
// bits in the byte stream, to exercise the error-correcting codes. It is
// programmable in three ways, as in the published design: by a number of
// errors, by an error rate, or by a pseudo-random function.
//
//   FI_COUNT  : after page_start, inject err_num single-bit errors, one every
//               err_rate bytes (the first at byte err_rate-1), then stop.
//   FI_RATE   : one single-bit error every err_rate bytes, without end.
//   FI_RANDOM : each byte gets one flipped bit when the low 16 bits of a
//               32-bit Galois LFSR are below err_thresh (probability
//               err_thresh/65536).
//
// The bit to flip comes from the LFSR in every mode. The LFSR advances once
// per valid byte and is reloaded with seed when seed_load is high. The exact
// register layout is this design's; in the full chip these inputs would be
// written over the APB or RS232 test port.
//
// Timing: combinational from data_in to data_out (no added latency); counters
// update on each clock with data_valid. inj_count counts injected errors
// since page_start.
module fault_injector
  import imm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fi_mode_e    mode,
  input  logic [15:0] err_num,
  input  logic [15:0] err_rate,     // >= 1
  input  logic [15:0] err_thresh,
  input  logic        seed_load,
  input  logic [31:0] seed,
  input  logic        page_start,   // restarts the count of bytes and errors
  input  logic        data_valid,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out,
  output logic        inject,       // an error is put on this byte
  output logic [15:0] inj_count
);
  logic [31:0] lfsr;
  logic [15:0] byte_cnt;   // bytes since the last error (or page start)
  logic        hit;

  always_comb begin
    unique case (mode)
      FI_COUNT:  hit = (byte_cnt == err_rate - 16'd1) && (inj_count < err_num);
      FI_RATE:   hit = (byte_cnt == err_rate - 16'd1);
      FI_RANDOM: hit = (lfsr[15:0] < err_thresh);
      default:   hit = 1'b0;
    endcase
    inject   = data_valid && hit;
    data_out = data_in ^ (inject ? (8'd1 << lfsr[18:16]) : 8'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= 32'h1;
      byte_cnt  <= '0;
      inj_count <= '0;
    end else begin
      if (seed_load) lfsr <= (seed == 32'd0) ? 32'h1 : seed;
      else if (data_valid)
        // Galois LFSR, x^32 + x^22 + x^2 + x + 1
        lfsr <= {1'b0, lfsr[31:1]} ^ (lfsr[0] ? 32'h8020_0003 : 32'h0);
      if (page_start) begin
        byte_cnt  <= '0;
        inj_count <= '0;
      end else if (data_valid) begin
        byte_cnt <= (byte_cnt == err_rate - 16'd1) ? 16'd0 : byte_cnt + 16'd1;
        if (inject) inj_count <= inj_count + 16'd1;
      end
    end
  end
endmodule
