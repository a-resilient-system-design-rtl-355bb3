// Types and checksum helpers of the SD-bus (SD mode and SPI mode) logic.
//
// CRC7 (x^7+x^3+1) protects SD commands and most responses; CRC16-CCITT
// (x^16+x^12+x^5+1) protects each DAT line of a data block. Both start from
// zero and take bits most-significant first, as the SD physical layer
// specification defines them. The functions advance the CRC by one bit so
// the engines can update it as bits go out on or arrive from the wire.
package sd_pkg;

  // Response format expected after a command.
  typedef enum logic [1:0] {
    RSP_NONE    = 2'd0,   // CMD0: no response
    RSP_48      = 2'd1,   // R1/R1b/R6/R7: 48 bits, CRC7 checked
    RSP_48_NOCRC= 2'd2,   // R3 (OCR): 48 bits, CRC field is all ones
    RSP_136     = 2'd3    // R2 (CID/CSD): 136 bits
  } rsp_e;

  typedef enum logic [1:0] {
    DAT_RX   = 2'd0,      // receive one block
    DAT_TX   = 2'd1,      // send one block, then collect CRC status and busy
    DAT_BUSY = 2'd2       // wait while the card holds DAT0 low (R1b)
  } dat_op_e;

  function automatic logic [6:0] crc7_bit(input logic [6:0] crc, input logic b);
    logic fb;
    fb = crc[6] ^ b;
    return {crc[5:3], crc[2] ^ fb, crc[1:0], fb};
  endfunction

  function automatic logic [15:0] crc16_bit(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[15] ^ b;
    return {crc[14:12], crc[11] ^ fb, crc[10:5], crc[4] ^ fb, crc[3:0], fb};
  endfunction

  // CRC7 over the 40 leading bits (start, direction, index, argument) of a
  // command or response.
  function automatic logic [6:0] crc7_40(input logic [39:0] bits);
    logic [6:0] c;
    c = '0;
    for (int i = 39; i >= 0; i--) c = crc7_bit(c, bits[i]);
    return c;
  endfunction

endpackage
