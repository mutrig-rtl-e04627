// crc16: running CRC-16 over the bytes of one frame; the frame generator
// appends the result at the end of the frame so the receiver can detect
// transmission errors.
//
// Polynomial x^16 + x^12 + x^5 + 1 (0x1021), initial value 0xFFFF, bits
// taken MSB first, no final inversion. One byte per cycle: `clear` starts a
// new frame, `en` folds `data` into the register. The 16-bit CRC at the end
// of each frame follows the chip description; the polynomial and initial
// value are this design's choice. crc is registered and reflects all bytes
// accepted up to the previous clock edge.
module crc16
  import mutrig_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= 16'hFFFF;
    else if (clear) crc <= en ? crc16_byte(16'hFFFF, data) : 16'hFFFF;
    else if (en)    crc <= crc16_byte(crc, data);
  end
endmodule
