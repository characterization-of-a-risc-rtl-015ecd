// flash_apb_model: behavioural model of the on-chip flash (eNVM) behind its APB3 port.
//
// Behavioural model, not synthesizable design: it stands in for the FPGA vendor's embedded
// non-volatile memory, which is reached through the vendor microcontroller subsystem and is not
// part of the RTL. WORDS 32-bit words (default 65536 = 256 KiB), addressed by paddr[..:2]
// relative to the flash base; the testbench fills mem directly. Reads insert 0..MAX_WAIT
// random wait states (pready low in the access phase). Writes are refused with pslverr, since
// the flash is programmed only outside normal operation; writes_refused counts them.
`timescale 1ns/1ps
module flash_apb_model #(
  parameter int unsigned WORDS    = 65536,
  parameter int unsigned MAX_WAIT = 2
) (
  input  logic        clk,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr
);
  logic [31:0] mem [WORDS];
  int wait_cnt = 0;
  int reads = 0;
  int writes_refused = 0;

  always @(posedge clk) begin
    if (psel && !penable) wait_cnt <= $urandom_range(0, MAX_WAIT);
    else if (psel && penable && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
    if (psel && penable && pready) begin
      if (pwrite) writes_refused <= writes_refused + 1;
      else        reads <= reads + 1;
    end
  end

  always_comb begin
    pready  = psel && penable && (wait_cnt == 0);
    pslverr = pready && pwrite;
    prdata  = mem[$clog2(WORDS)'(paddr[31:2])];
  end

  // the payload of a refused write is not used
  logic unused;
  assign unused = ^pwdata;
endmodule
