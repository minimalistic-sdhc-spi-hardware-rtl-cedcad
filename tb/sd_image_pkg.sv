// sd_image_pkg: the contents of the simulated SD card, as a formula.
//
// Block b, byte i of the card image is sd_byte(b, i). Blocks 8p .. 8p+5
// (p = 0..15) hold program p for the boot loader: 1024 18-bit
// instructions, three bytes each, most significant six bits first, two
// upper bits of every byte zero. Instruction k of program p is
// prog_word(p, k): a hash of (p, k), except for program 15, which is a
// small test program (load s0,AA / output s0,04 / jump 0). All other
// bytes follow a simple hash of (b, i).
package sd_image_pkg;

  function automatic logic [17:0] prog_word(int unsigned p, int unsigned k);
    logic [31:0] h;
    // slot 15: a three-instruction test program, the rest of it zero
    //   0: load s0, AA    1: output s0, 04    2: jump 0
    if (p == 15) begin
      case (k)
        0:       return 18'h000AA;
        1:       return 18'h2C004;
        2:       return 18'h34000;
        default: return 18'h00000;
      endcase
    end
    h = k * 32'd2654435761 + p * 32'd40503 + 32'h1234;
    h = h ^ (h >> 13);
    return h[17:0];
  endfunction

  function automatic logic [7:0] sd_byte(int unsigned b, int unsigned i);
    int unsigned p, g, k, part;
    logic [17:0] w;
    p = b / 8;
    if (p < 16 && (b % 8) < 6) begin
      g    = (b % 8) * 512 + i;
      k    = g / 3;
      part = g % 3;
      w    = prog_word(p, k);
      case (part)
        0:       return {2'b00, w[17:12]};
        1:       return {2'b00, w[11:6]};
        default: return {2'b00, w[5:0]};
      endcase
    end
    return 8'((b * 131 + i * 17) ^ (i >> 5) ^ (b >> 3));
  endfunction

endpackage
