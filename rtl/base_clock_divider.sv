// base_clock_divider: divides the main clock into the base clock.
//
// A down counter runs from DIV-1 to 0 on every main clock pulse that is
// present (clk_en high) and marks count 0 with `tick`, one base clock event
// every DIV main periods (36 x 20 ns = 720 ns by default, as on the trainer).
// Two corrections act on the period that starts at count DIV-1:
//   * a removed main clock pulse (clk_en low) holds the count, so that count
//     lasts two main periods and the base period is DIV+1 periods long;
//   * `skip` high while the count is DIV-1 jumps straight to DIV-3, so this
//     base period lasts DIV-1 (= m) main periods instead of DIV (= m+1).
// The counter numbering DIV-1..0 and the place of both corrections at its top
// follow the trainer's timing diagrams. RESET_CNT sets the phase after reset;
// the decoder starts half a base period away from the coder.
//
// Interface: tick is combinational from the count register and clk_en; cnt is
// registered.
module base_clock_divider #(
  parameter int unsigned DIV       = ansdm_pkg::BASE_DIV,
  parameter int unsigned CNT_W     = ansdm_pkg::CNT_W,
  parameter int unsigned RESET_CNT = DIV - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clk_en,
  input  logic             skip,
  output logic [CNT_W-1:0] cnt,
  output logic             tick
);

  localparam logic [CNT_W-1:0] TOP = CNT_W'(DIV - 1);

  assign tick = clk_en && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= CNT_W'(RESET_CNT);
    else if (clk_en) begin
      if (cnt == '0)
        cnt <= TOP;
      else if (skip && cnt == TOP)
        cnt <= TOP - CNT_W'(2);
      else
        cnt <= cnt - CNT_W'(1);
    end
  end

  initial begin
    assert (DIV >= 4 && DIV <= (1 << CNT_W)) else $error("DIV out of range");
    assert (RESET_CNT < DIV) else $error("RESET_CNT out of range");
  end

endmodule
