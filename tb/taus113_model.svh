// taus113_model.svh - behavioural model of the combined Tausworthe
// generator used by the AWGN testbenches (one step of each of the four
// components, seeds conditioned like the RTL).
function automatic void taus_seed(ref bit [31:0] z[4], input bit [127:0] seed);
  z[0] = seed[31:0]   | 32'h2;
  z[1] = seed[63:32]  | 32'h8;
  z[2] = seed[95:64]  | 32'h10;
  z[3] = seed[127:96] | 32'h80;
endfunction

function automatic bit [31:0] taus_out(bit [31:0] z[4]);
  return z[0] ^ z[1] ^ z[2] ^ z[3];
endfunction

function automatic void taus_step(ref bit [31:0] z[4]);
  bit [31:0] b;
  b = ((z[0] << 6) ^ z[0]) >> 13;   z[0] = ((z[0] & ~32'd1)   << 18) ^ b;
  b = ((z[1] << 2) ^ z[1]) >> 27;   z[1] = ((z[1] & ~32'd7)   << 2)  ^ b;
  b = ((z[2] << 13) ^ z[2]) >> 21;  z[2] = ((z[2] & ~32'd15)  << 7)  ^ b;
  b = ((z[3] << 3) ^ z[3]) >> 12;   z[3] = ((z[3] & ~32'd127) << 13) ^ b;
endfunction
