// aes_engine_top: hardware AES-128 accelerator for an embedded processor.
//
// The processor streams a session over a 32-bit FSL link: a mode word
// (encrypt or decrypt), the number of 128-bit blocks, the 128-bit session
// key and then the blocks.  fsl_controller gathers the words into keys and
// blocks, enables the encryption or the decryption core, and returns each
// processed block as four words on the outgoing FSL link.  Each core is
// space-optimised: one round unit used ten times, S-boxes in small block
// memories read one byte per cycle, and a key expansion unit that expands
// the whole session key once before the first block.
//
// Timing per session: 70 cycles of key expansion after the key arrives;
// per block 190 cycles in the core plus at least 8 cycles to receive and 8
// cycles to return its four words, with a few cycles of control between.
// Reset is synchronous and active high.  The ports are the FSL slave and
// master signals of the accelerator plus status outputs for observation.
module aes_engine_top
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  output logic [31:0] fsl_m_data,
  output logic        fsl_m_write,
  input  logic        fsl_m_full,
  output logic        mode_decrypt,
  output logic        session_active,
  output logic [31:0] blocks_left,
  output logic        enc_busy,
  output logic        dec_busy
);

  cipher_req_t enc_req, dec_req;
  cipher_rsp_t enc_rsp, dec_rsp;
  mode_e       mode;

  fsl_controller u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .fsl_s_data     (fsl_s_data),
    .fsl_s_exists   (fsl_s_exists),
    .fsl_s_read     (fsl_s_read),
    .fsl_m_data     (fsl_m_data),
    .fsl_m_write    (fsl_m_write),
    .fsl_m_full     (fsl_m_full),
    .enc_req        (enc_req),
    .enc_rsp        (enc_rsp),
    .dec_req        (dec_req),
    .dec_rsp        (dec_rsp),
    .mode           (mode),
    .session_active (session_active),
    .blocks_left    (blocks_left)
  );

  aes_encrypt u_enc (
    .clk (clk),
    .rst (rst),
    .req (enc_req),
    .rsp (enc_rsp)
  );

  aes_decrypt u_dec (
    .clk (clk),
    .rst (rst),
    .req (dec_req),
    .rsp (dec_rsp)
  );

  assign mode_decrypt = (mode == MODE_DECRYPT);
  assign enc_busy     = enc_rsp.busy;
  assign dec_busy     = dec_rsp.busy;

endmodule
