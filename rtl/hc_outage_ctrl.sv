// hc_outage_ctrl: power outage controller for intermittent-supply operation.
//
// Raises pwr_fail at cycle cfg_start after reset, then holds it until the memory hierarchy
// reports backup_done. The supply is then taken to be back at once (the sleep time until
// enough energy is harvested is not modelled), pwr_fail falls, and the controller lets the
// system run cfg_period more cycles before the next outage, until cfg_max outages have
// happened (cfg_max = 0: never). outage_cnt counts the outages handled so far.
// Timing: pwr_fail rises in the cycle after the counter reaches its target and falls in the
// cycle after backup_done was seen high. All counts are in cycles of clk.
// The three settings (first outage cycle, period after a completed backup, maximum count)
// follow the design description; giving them as inputs rather than parameters, the counter
// widths and the immediate restore are this design's choices.
module hc_outage_ctrl #(
  parameter int unsigned CYC_W = 32,
  parameter int unsigned NUM_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CYC_W-1:0] cfg_start,
  input  logic [CYC_W-1:0] cfg_period,
  input  logic [NUM_W-1:0] cfg_max,
  input  logic             backup_done,
  output logic             pwr_fail,
  output logic [NUM_W-1:0] outage_cnt
);
  typedef enum logic [1:0] {O_FIRST, O_FAIL, O_RUN, O_STOP} ostate_e;

  ostate_e          st_q;
  logic [CYC_W-1:0] cyc_q;

  assign pwr_fail = (st_q == O_FAIL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= O_FIRST;
      cyc_q      <= '0;
      outage_cnt <= '0;
    end else begin
      unique case (st_q)
        O_FIRST, O_RUN: begin
          if (outage_cnt >= cfg_max) st_q <= O_STOP;
          else if (cyc_q >= ((st_q == O_FIRST) ? cfg_start : cfg_period)) st_q <= O_FAIL;
          else cyc_q <= cyc_q + 1'b1;
        end
        O_FAIL: if (backup_done) begin
          outage_cnt <= outage_cnt + 1'b1;
          cyc_q      <= '0;
          st_q       <= O_RUN;
        end
        default: ;
      endcase
    end
  end
endmodule
