// des_top: the ciphers of this design side by side.
//
// 1. DES engine: des_modes (ECB/CBC front end with valid/ready handshakes)
//    around des_pipe, the 16-stage pipelined DES core. In ECB mode it
//    takes and returns one 64-bit block per cycle with a 16-cycle latency;
//    in CBC mode one block every 16 cycles.
// 2. Triple DES: tdes_pipe, three DES pipelines in EDE order, one block per
//    cycle, 48-cycle latency, with its own clock enable.
// 3. RC5: rc5_core, an iterative RC5-32/12 engine (R+1 cycles per block)
//    whose expanded key words are an input, since the key expansion is not
//    part of this design.
// The three share only clock and reset; their ports are brought out
// unchanged with a des_, tdes_ or rc5_ prefix. The document presents the
// three ciphers separately; placing them side by side in one top level is
// this design's arrangement.
module des_top
  import des_pkg::*;
#(
  parameter int unsigned RC5_W = 32,
  parameter int unsigned RC5_R = 12
) (
  input  logic   clk,
  input  logic   rst_n,              // asynchronous, active-low

  // DES engine
  input  logic   des_cfg_valid,
  output logic   des_cfg_ready,
  input  block_t des_cfg_key,
  input  logic   des_cfg_decrypt,
  input  mode_e  des_cfg_mode,
  input  block_t des_cfg_iv,
  input  logic   des_in_valid,
  output logic   des_in_ready,
  input  block_t des_in_data,
  output logic   des_out_valid,
  input  logic   des_out_ready,
  output block_t des_out_data,

  // Triple DES
  input  logic   tdes_ce,
  input  logic   tdes_in_valid,
  input  block_t tdes_pt,
  input  block_t tdes_key1,
  input  block_t tdes_key2,
  input  block_t tdes_key3,
  output logic   tdes_out_valid,
  output block_t tdes_ct,

  // RC5
  input  logic                         rc5_start,
  input  logic                         rc5_decrypt,
  input  logic [RC5_W-1:0]             rc5_a_in,
  input  logic [RC5_W-1:0]             rc5_b_in,
  input  logic [2*RC5_R+1:0][RC5_W-1:0] rc5_s,
  output logic                         rc5_busy,
  output logic                         rc5_done,
  output logic [RC5_W-1:0]             rc5_a_out,
  output logic [RC5_W-1:0]             rc5_b_out
);
  des_modes u_des (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_valid   (des_cfg_valid),
    .cfg_ready   (des_cfg_ready),
    .cfg_key     (des_cfg_key),
    .cfg_decrypt (des_cfg_decrypt),
    .cfg_mode    (des_cfg_mode),
    .cfg_iv      (des_cfg_iv),
    .in_valid    (des_in_valid),
    .in_ready    (des_in_ready),
    .in_data     (des_in_data),
    .out_valid   (des_out_valid),
    .out_ready   (des_out_ready),
    .out_data    (des_out_data)
  );

  tdes_pipe u_tdes (
    .clk       (clk),
    .rst_n     (rst_n),
    .ce        (tdes_ce),
    .in_valid  (tdes_in_valid),
    .pt        (tdes_pt),
    .key1      (tdes_key1),
    .key2      (tdes_key2),
    .key3      (tdes_key3),
    .out_valid (tdes_out_valid),
    .ct        (tdes_ct)
  );

  rc5_core #(.W(RC5_W), .R(RC5_R)) u_rc5 (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (rc5_start),
    .decrypt (rc5_decrypt),
    .a_in    (rc5_a_in),
    .b_in    (rc5_b_in),
    .s       (rc5_s),
    .busy    (rc5_busy),
    .done    (rc5_done),
    .a_out   (rc5_a_out),
    .b_out   (rc5_b_out)
  );
endmodule
