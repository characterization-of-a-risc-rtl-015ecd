// reset_ctrl: combines the power-on reset and the watchdog reset into the SoC reset and
// remembers which one happened last.
//
// soc_rst_n is asserted at once (asynchronously) by por_rst_n and on the next clock edge by a
// watchdog request. It is released on a clock edge: STRETCH+1 rising edges after por_rst_n
// rises, or after the edge that saw the watchdog request. The watchdog, being reset itself,
// drops its request at once, so each request gives one clean pulse. soc_rst_n is used as the
// asynchronous reset of every flop in the SoC and is also read by the bus-protocol assertion
// of the APB3 bridge; lint reports that mixed use (SYNCASYNCNET), and it is harmless here,
// because the signal leaves a flop and is released synchronously. wdt_cause is 1 after a
// watchdog reset and 0 after a power-on reset; only the power-on reset clears it, so software
// can read the cause in the reset-cause CSR after restarting. The document names both reset
// sources and the reset-cause register; the stretch length is this design's choice.
module reset_ctrl #(
  parameter int unsigned STRETCH = 16
) (
  input  logic clk,
  input  logic por_rst_n,
  input  logic wdt_rst_req,
  output logic soc_rst_n,
  output logic wdt_cause
);
  localparam int unsigned CW = $clog2(STRETCH + 1);
  logic [CW-1:0] cnt_q;
  logic rst_q, cause_q;

  always_ff @(posedge clk or negedge por_rst_n) begin
    if (!por_rst_n) begin
      cnt_q   <= CW'(STRETCH);
      rst_q   <= 1'b0;
      cause_q <= 1'b0;
    end else if (wdt_rst_req) begin
      cnt_q   <= CW'(STRETCH);
      rst_q   <= 1'b0;
      cause_q <= 1'b1;
    end else if (cnt_q != '0) begin
      cnt_q   <= cnt_q - 1'b1;
      rst_q   <= 1'b0;
    end else begin
      rst_q   <= 1'b1;
    end
  end

  assign soc_rst_n = rst_q;
  assign wdt_cause = cause_q;
endmodule
