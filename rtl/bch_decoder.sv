// bch_decoder: decoder of the page BCH code (GF(2^15), t = 15, 2048 data
// bytes + 29 parity bytes). It corrects up to 15 bit errors anywhere in the
// code word and flags words with more errors that it can recognise.
//
// How it works, in three phases:
//  1. RECEIVE  one byte per clock. The data bytes are stored in a page buffer
//     while the odd syndromes S1, S3, ..., S29 are accumulated by Horner's
//     rule (eight unrolled steps per byte, constant multipliers). Only the
//     first bit of the last parity byte belongs to the code word.
//  2. BM       one cycle squares odd syndromes into the even ones, then the
//     simplified inversion-free Berlekamp-Massey algorithm for binary codes
//     runs one iteration per clock, t = 15 clocks, giving the error-locator
//     polynomial Lambda(x) of degree L.
//  3. CHIEN    byte-oriented Chien search: each clock evaluates Lambda at the
//     eight code positions of one byte (first transmitted bit = highest
//     power x^(n-1), n = 16609), flips the bits whose position is a root,
//     and sends the corrected data byte out. The 29 parity bytes are then
//     searched too, only to count roots: if the roots found differ from L
//     the word is flagged uncorrectable.
//
// The code, its parameters and the byte-oriented organisation follow the
// published design. The published decoder has 15 Galois multipliers and a
// latency of code size + 71 cycles; this one trades area for simplicity
// (one BM iteration per clock, eight evaluation points per clock in the
// search) and its latency from the last input byte to the first output byte
// is t + 2 = 17 cycles, i.e. about code size + 17 from the first input byte.
//
// Interface:
//   in_valid/in_data, in_ready : code word bytes, PAGE_B + 29, in order;
//                 in_ready is high only while receiving.
//   out_valid/out_data         : PAGE_B corrected data bytes, one per clock.
//   done (one cycle), err_count (= L), uncorrectable : result of the word,
//                 valid with done, which comes 29 cycles after the last
//                 output byte.
module bch_decoder
  import imm_pkg::*;
#(
  parameter int unsigned PAGE_B = PAGE_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       done,
  output logic [4:0] err_count,
  output logic       uncorrectable
);
  localparam int unsigned T      = BCH_T;
  localparam int unsigned PB     = BCH_PAR_BYTES;
  localparam int unsigned NBYTES = PAGE_B + PB;
  localparam int unsigned NBITS  = PAGE_B * 8 + BCH_PAR;
  localparam int unsigned AW     = $clog2(NBYTES);

  typedef gf_t gf_arr_t [T+1];        // index 0..T
  typedef gf_t syn_arr_t [2*T+1];     // index 1..2T used
  typedef gf_t pow8_arr_t [(T+1)*8];   // index i*8 + m

  // alpha^(i*m), i = 0..T
  function automatic gf_arr_t pow_table(int unsigned m);
    gf_arr_t r;
    for (int i = 0; i <= int'(T); i++) r[i] = gf_alpha_pow((i * m) % GF_N);
    return r;
  endfunction
  // alpha^(2i-1): Horner step of syndrome S_(2i-1) held in slot i
  function automatic gf_arr_t syn_pows();
    gf_arr_t r;
    for (int i = 0; i <= int'(T); i++)
      r[i] = (i == 0) ? gf_t'(1) : gf_alpha_pow(2 * i - 1);
    return r;
  endfunction
  // Chien: alpha^(i*m) for m = 0..7 and initial alpha^(-i(n-1))
  function automatic pow8_arr_t chien_pows();
    pow8_arr_t r;
    for (int i = 0; i <= int'(T); i++)
      for (int m = 0; m < 8; m++) r[i*8 + m] = gf_alpha_pow((i * m) % GF_N);
    return r;
  endfunction
  function automatic gf_arr_t chien_init();
    gf_arr_t r;
    for (int i = 0; i <= int'(T); i++)
      r[i] = gf_alpha_pow((GF_N - (i * (NBITS - 1)) % GF_N) % GF_N);
    return r;
  endfunction

  localparam gf_arr_t   SYN_POW   = syn_pows();
  localparam pow8_arr_t CHIEN_POW = chien_pows();
  localparam gf_arr_t   CHIEN_STEP = pow_table(8);
  localparam gf_arr_t   CHIEN_INIT = chien_init();

  typedef enum logic [2:0] {S_RECV, S_EVEN, S_BM, S_CHIEN, S_DONE} state_e;
  state_e state;

  logic [7:0]    buffer [PAGE_B];
  logic [AW-1:0] cnt;
  gf_t           syn_odd [T+1];   // slot i holds S_(2i-1), i = 1..T
  syn_arr_t      syn;             // S_1..S_2T
  gf_arr_t       lam, bpoly;
  gf_t           gamma;
  logic [4:0]    len;             // L
  logic [3:0]    iter;
  gf_arr_t       term;
  logic [4:0]    roots;

  assign in_ready = (state == S_RECV);

  // ------------------------------------------------ syndrome update (comb)
  gf_t syn_next [T+1];
  always_comb begin
    for (int i = 0; i <= int'(T); i++) begin
      syn_next[i] = syn_odd[i];
      for (int b = 7; b >= 0; b--)
        if (cnt != AW'(NBYTES - 1) || b == 7)
          syn_next[i] = gf_mul(syn_next[i], SYN_POW[i]) ^ gf_t'(in_data[b]);
    end
  end

  // ------------------------------------------------ BM iteration (comb)
  // k = 2*iter + 1; delta = sum_i lam_i * S_(k-i)
  gf_t     delta;
  gf_arr_t lam_next;
  always_comb begin
    int k;
    k     = 2 * int'(iter) + 1;
    delta = '0;
    for (int i = 0; i <= int'(T); i++)
      if (k - i >= 1) delta ^= gf_mul(lam[i], syn[k - i]);
    for (int i = 0; i <= int'(T); i++)
      lam_next[i] = gf_mul(gamma, lam[i]) ^ ((i >= 1) ? gf_mul(delta, bpoly[i-1]) : '0);
  end

  // ------------------------------------------------ Chien (comb)
  logic [7:0] root_mask;
  logic [7:0] valid_mask;
  always_comb begin
    for (int m = 0; m < 8; m++) begin
      gf_t v;
      v = '0;
      for (int i = 0; i <= int'(T); i++) v ^= gf_mul(term[i], CHIEN_POW[i*8 + m]);
      root_mask[7 - m] = (v == '0);
    end
    valid_mask = (cnt == AW'(NBYTES - 1)) ? 8'h80 : 8'hff;
  end

  logic [4:0] roots_here;
  always_comb begin
    roots_here = '0;
    for (int b = 0; b < 8; b++) roots_here += 5'(root_mask[b] & valid_mask[b]);
  end

  always_ff @(posedge clk) begin
    if (state == S_RECV && in_valid && cnt < AW'(PAGE_B))
      buffer[cnt[$clog2(PAGE_B)-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_RECV;
      cnt           <= '0;
      iter          <= '0;
      gamma         <= gf_t'(1);
      len           <= '0;
      roots         <= '0;
      out_valid     <= 1'b0;
      out_data      <= '0;
      done          <= 1'b0;
      err_count     <= '0;
      uncorrectable <= 1'b0;
      for (int i = 0; i <= int'(T); i++) begin
        syn_odd[i] <= '0;
        lam[i]     <= '0;
        bpoly[i]   <= '0;
        term[i]    <= '0;
      end
      for (int j = 0; j <= 2 * int'(T); j++) syn[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        S_RECV: if (in_valid) begin
          for (int i = 0; i <= int'(T); i++) syn_odd[i] <= syn_next[i];
          if (cnt == AW'(NBYTES - 1)) begin
            cnt   <= '0;
            state <= S_EVEN;
          end else cnt <= cnt + 1'b1;
        end
        S_EVEN: begin
          // S_(2j) = S_j^2 ; odd ones copied from their slots
          for (int j = 1; j <= 2 * int'(T); j++) begin
            gf_t s;
            s = '0;
            for (int q = 0; q < 5; q++)   // j = odd * 2^q
              if (j % (1 << q) == 0 && (j >> q) % 2 == 1) begin
                s = syn_odd[((j >> q) + 1) / 2];
                for (int r = 0; r < q; r++) s = gf_mul(s, s);
              end
            syn[j] <= s;
          end
          for (int i = 0; i <= int'(T); i++) begin
            lam[i]   <= (i == 0) ? gf_t'(1) : '0;
            bpoly[i] <= (i == 0) ? gf_t'(1) : '0;
          end
          gamma <= gf_t'(1);
          len   <= '0;
          iter  <= '0;
          state <= S_BM;
        end
        S_BM: begin
          for (int i = 0; i <= int'(T); i++) lam[i] <= lam_next[i];
          if (delta != '0 && {len, 1'b0} <= 6'(2 * iter)) begin
            // B <- x * Lambda ; L <- k - L ; gamma <- delta
            for (int i = 0; i <= int'(T); i++) bpoly[i] <= (i >= 1) ? lam[i-1] : '0;
            len   <= 5'(2 * iter + 1) - len;
            gamma <= delta;
          end else begin
            // B <- x^2 * B
            for (int i = 0; i <= int'(T); i++) bpoly[i] <= (i >= 2) ? bpoly[i-2] : '0;
          end
          if (iter == 4'(T - 1)) state <= S_CHIEN;
          iter <= iter + 1'b1;
          for (int i = 0; i <= int'(T); i++) term[i] <= gf_mul(lam_next[i], CHIEN_INIT[i]);
          roots <= '0;
          cnt   <= '0;
        end
        S_CHIEN: begin
          for (int i = 0; i <= int'(T); i++) term[i] <= gf_mul(term[i], CHIEN_STEP[i]);
          roots <= roots + roots_here;
          if (cnt < AW'(PAGE_B)) begin
            out_valid <= 1'b1;
            out_data  <= buffer[cnt[$clog2(PAGE_B)-1:0]] ^ root_mask;
          end
          if (cnt == AW'(NBYTES - 1)) begin
            state <= S_DONE;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DONE: begin
          done          <= 1'b1;
          err_count     <= len;
          uncorrectable <= (roots != len) || (len > 5'(T));
          for (int i = 0; i <= int'(T); i++) syn_odd[i] <= '0;
          state         <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule
