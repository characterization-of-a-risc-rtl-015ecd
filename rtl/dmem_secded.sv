// dmem_secded: the SoC data memory, a block RAM of 39-bit SECDED words.
//
// Every 32-bit word is stored with its seven check bits (secded_enc on the way in) and
// checked on the way out (secded_dec), whose correction is switched by correct_en, the data
// memory bit of the core's hardening configuration. err_single/err_double come with the grant
// of each access that read the array.
// Handshake: req, we, be, addr and wdata stay stable until gnt, a one-cycle pulse.
//   full-word write   : written in the request cycle, gnt on the next cycle
//   read              : synchronous array read, gnt with rdata on the next cycle
//   partial write     : read, correct, merge the enabled bytes, re-encode and write back;
//                       gnt on the next cycle (read-modify-write, needed because the code
//                       covers the whole word)
// WORDS defaults to 8192 words (32 KiB). The document gives no size; 8192 words is the size
// that uses 16 RAM18K blocks at 32 bits and 20 at 39 bits in 2Kx9 mode, the block counts it
// reports. The array is not reset, as a block RAM is not.
module dmem_secded
  import soc_pkg::*;
#(
  parameter int unsigned WORDS = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        correct_en,
  output logic        gnt,
  output logic [31:0] rdata,
  output logic        err_single,
  output logic        err_double
);
  localparam int unsigned AW = $clog2(WORDS);

  typedef enum logic [1:0] {M_IDLE, M_READ, M_DONE} mstate_e;
  mstate_e state_q;

  logic [CODE_W-1:0] mem [WORDS];
  logic [CODE_W-1:0] rd_q;
  logic [AW-1:0]     idx;
  logic [31:0]       dec_data, merged;
  logic              dec_s, dec_d;
  logic [CODE_W-1:0] full_code, merge_code;
  logic              wr_full, wr_merge;

  assign idx = addr[AW+1:2];

  secded_dec u_dec (.code(rd_q), .correct_en(correct_en), .data(dec_data),
                    .err_single(dec_s), .err_double(dec_d));

  always_comb begin
    for (int b = 0; b < 4; b++)
      merged[8*b +: 8] = be[b] ? wdata[8*b +: 8] : dec_data[8*b +: 8];
  end

  secded_enc u_enc_full  (.data(wdata),  .code(full_code));
  secded_enc u_enc_merge (.data(merged), .code(merge_code));

  assign wr_full  = (state_q == M_IDLE) && req && we && (be == 4'hF);
  assign wr_merge = (state_q == M_READ) && we;

  // block RAM: one synchronous read port, one write port
  always_ff @(posedge clk) begin
    if (wr_full)       mem[idx] <= full_code;
    else if (wr_merge) mem[idx] <= merge_code;
    rd_q <= mem[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= M_IDLE;
    else begin
      unique case (state_q)
        M_IDLE:  if (req) state_q <= (we && be == 4'hF) ? M_DONE : M_READ;
        default: state_q <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    gnt        = (state_q != M_IDLE);
    rdata      = dec_data;
    err_single = (state_q == M_READ) && dec_s;
    err_double = (state_q == M_READ) && dec_d;
  end
endmodule
