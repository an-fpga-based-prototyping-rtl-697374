// Reference CRCs for the testbenches, written independently of ipc_pkg:
// CRC-16 poly 0x1021 and CRC-32 poly 0x04C11DB7, MSB first, all-ones init,
// computed over a whole byte queue with a 1-bit-at-a-time shift register.
function automatic logic [15:0] ref_crc16(input logic [7:0] b [$]);
  logic [15:0] r = 16'hFFFF;
  foreach (b[i])
    for (int k = 0; k < 8; k++) begin
      logic fb;
      fb = r[15] ^ b[i][7-k];
      r = r << 1;
      if (fb) r = r ^ 16'h1021;
    end
  return r;
endfunction

function automatic logic [31:0] ref_crc32(input logic [7:0] b [$]);
  logic [31:0] r = 32'hFFFFFFFF;
  foreach (b[i])
    for (int k = 0; k < 8; k++) begin
      logic fb;
      fb = r[31] ^ b[i][7-k];
      r = r << 1;
      if (fb) r = r ^ 32'h04C11DB7;
    end
  return r;
endfunction
