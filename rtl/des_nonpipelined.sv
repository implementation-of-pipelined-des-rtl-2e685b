// des_nonpipelined: iterative DES engine, one round per clock.
//
// Wires the three blocks of the iterative design together: the controller
// (FSM, IP, FP, L/R registers), the indexed key scheduler and the round
// function F. The controller sends the key and the key number i to the key
// scheduler and gets K(i) back; it sends R(i-1) and K(i) to F and gets F
// back. One 64-bit block is encrypted or decrypted in sixteen clocks: start
// is sampled while busy is low, done pulses with dout valid sixteen cycles
// later (see des_ctrl). The block split and the wiring follow the
// document's block diagram; the handshake is this design's own.
module des_nonpipelined (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        decrypt,   // 1 = decrypt
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic        busy,
  output logic        done,
  output logic [63:0] dout
);
  logic [63:0] ks_key;
  logic [3:0]  ks_num;
  logic        ks_decrypt;
  logic [47:0] ks_subkey;
  logic [31:0] f_r;
  logic [47:0] f_k;
  logic [31:0] f_out;

  des_ctrl u_ctrl (
    .clk, .rst_n, .start, .decrypt,
    .key_in (key), .din, .busy, .done, .dout,
    .ks_key, .ks_num, .ks_decrypt, .ks_subkey,
    .f_r, .f_k, .f_in (f_out)
  );

  des_key_sched u_ks (
    .key (ks_key), .num (ks_num), .decrypt (ks_decrypt), .subkey (ks_subkey)
  );

  des_f u_f (.r (f_r), .k (f_k), .f (f_out));

endmodule
