// hk_monitor: housekeeping watch of the NAND flash supply current and the
// board temperature. Each new pair of 14-bit readings (as delivered by the
// external current/temperature monitor IC) is compared with programmable
// thresholds; when either reading is above its threshold for PERSIST
// consecutive samples the monitor raises power_off_req, the automatic
// power-off request, and holds it until clear_req. A sudden rise of NAND
// current is the sign of a latch-up. Programmable thresholds and the
// power-off request follow the published design; the persistence filter,
// the sticky request and the unsigned reading format are this design's.
//
// Interface: sample_valid qualifies current/temperature for one cycle.
// power_off_req rises in the cycle after the PERSIST-th violating sample.
module hk_monitor #(
  parameter int unsigned ADC_W   = 14,
  parameter int unsigned PERSIST = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_valid,
  input  logic [ADC_W-1:0] current,
  input  logic [ADC_W-1:0] temperature,
  input  logic [ADC_W-1:0] current_thr,
  input  logic [ADC_W-1:0] temp_thr,
  input  logic             clear_req,
  output logic             power_off_req,
  output logic             over_current,
  output logic             over_temp
);
  localparam int unsigned CNT_W = $clog2(PERSIST + 1);
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      power_off_req <= 1'b0;
      over_current  <= 1'b0;
      over_temp     <= 1'b0;
    end else begin
      if (sample_valid) begin
        over_current <= current > current_thr;
        over_temp    <= temperature > temp_thr;
        if (current > current_thr || temperature > temp_thr) begin
          if (cnt == CNT_W'(PERSIST - 1)) power_off_req <= 1'b1;
          if (cnt != CNT_W'(PERSIST)) cnt <= cnt + 1'b1;
        end else begin
          cnt <= '0;
        end
      end
      if (clear_req) begin
        power_off_req <= 1'b0;
        cnt           <= '0;
      end
    end
  end
endmodule
