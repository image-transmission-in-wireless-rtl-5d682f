// wmsn_pkg: types and constants shared by the camera-node RTL.
//
// Holds the application-layer message codes (a 0xAA sync byte followed by a
// type byte), the camera parameter word carried by CAMERA SETUP, the object
// bounding-box record returned by the image processing block, and the CRC-8
// byte update used by the image packets. The message codes follow the
// protocol's message table; the layout of the four camera-parameter bytes, the
// CRC polynomial (x^8+x^2+x+1, initial value 0) and the box record are this
// design's own choices.
package wmsn_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel intensity width
  localparam int unsigned COORD_W = 16;  // image coordinate width

  localparam logic [7:0] SYNC_BYTE = 8'hAA;

  // Second byte of each message header.
  typedef enum logic [7:0] {
    MSG_SETUP = 8'h00,  // CAMERA SETUP, 4 parameter bytes
    MSG_QUERY = 8'h01,  // IMAGE QUERY, no payload
    MSG_SIZE  = 8'h02,  // IMAGE SIZE, 2 bytes
    MSG_ACK   = 8'h03,  // ACK, packet ID (2 bytes)
    MSG_NACK  = 8'h04,  // NACK, packet ID (2 bytes)
    MSG_SOT   = 8'h05,  // START-OF-TRANSMISSION, packet size (1 byte)
    MSG_EOT   = 8'h06,  // END-OF-TRANSMISSION, no payload
    MSG_IMG   = 8'hAA   // image packet: ID (2), data (N), CRC-8 (1)
  } msg_type_e;

  // Packet ID carried by the ACK that answers a control message.
  localparam logic [15:0] CTRL_ACK_ID = 16'hFFFF;

  // Camera parameters; byte 0 of the payload is alpha_k, byte 3 is mode.
  typedef struct packed {
    logic [7:0] mode;      // bit 0: selective background update
    logic [7:0] diff_thr;  // object extraction difference threshold
    logic [7:0] upd_thr;   // updating threshold T
    logic [7:0] alpha_k;   // alpha = 1/2^k, k in bits [2:0]
  } cam_param_t;

  // Bounding box of the updated object, inclusive corners.
  typedef struct packed {
    logic               found;
    logic [COORD_W-1:0] x0;
    logic [COORD_W-1:0] y0;
    logic [COORD_W-1:0] x1;
    logic [COORD_W-1:0] y1;
  } obj_box_t;

  // CRC-8, polynomial 0x07, MSB first, one byte per call.
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] data);
    logic [7:0] c;
    c = crc ^ data;
    for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ 8'h07) : (c << 1);
    return c;
  endfunction

endpackage
