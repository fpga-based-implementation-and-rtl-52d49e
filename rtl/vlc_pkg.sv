// vlc_pkg: constants and types shared by the on-off keying (OOK) visible-light
// link. The frame format is fixed: an 8-bit header 1101_1011, a 16-bit
// payload length (number of data bytes), up to 1450 data bytes and an 8-bit
// footer 1010_0101. The header, footer, 1450-byte limit, 25 samples per bit,
// 14-bit DAC and 16-bit ADC widths are the link's published figures; the byte
// order of the length field (most significant byte first) and the bit order
// on the wire (most significant bit first) are this design's choice. Header
// and footer read the same in either bit order.
package vlc_pkg;

  localparam logic [7:0] FRAME_HEADER = 8'b1101_1011;
  localparam logic [7:0] FRAME_FOOTER = 8'b1010_0101;

  // Largest payload a frame may carry, in bytes.
  localparam int unsigned MAX_PAYLOAD = 1450;
  // Header + two length bytes + footer.
  localparam int unsigned FRAME_OVERHEAD = 4;
  // Samples of the DAC/ADC per transmitted bit (100 Msps / 25 = 4 Mbit/s).
  localparam int unsigned SAMPLES_PER_BIT = 25;

  localparam int unsigned DAC_W = 14;
  localparam int unsigned ADC_W = 16;

  // Byte positions inside a stored frame.
  localparam int unsigned POS_HEADER  = 0;
  localparam int unsigned POS_LEN_HI  = 1;
  localparam int unsigned POS_LEN_LO  = 2;
  localparam int unsigned POS_PAYLOAD = 3;

  // Receiver frame state machine.
  typedef enum logic [2:0] {
    RX_HUNT,     // shifting bits in, looking for the header byte
    RX_LEN,      // collecting the 16-bit payload length
    RX_PAYLOAD,  // collecting data bytes
    RX_FOOTER    // collecting the byte that must be the footer
  } rx_state_e;

  // Why the receiver dropped a candidate frame.
  typedef enum logic [1:0] {
    DROP_NONE,
    DROP_LENGTH,   // length field above the payload limit
    DROP_FOOTER    // byte after the payload was not the footer
  } rx_drop_e;

endpackage
