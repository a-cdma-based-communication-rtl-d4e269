// cdma_pkg: constants, types and the PN code table shared by the CDMA on-chip network.
//
// The network carries one data bit per node per chip-sync tick. Every node owns one
// 7-chip PN codeword; a '0' bit (or no packet) is sent as the codeword itself and a '1'
// bit as its inverse. The seven codewords are the seven cyclic shifts of the length-7
// m-sequence 1110100. Node IDs are 3 bits wide and run from 1 to 7; ID 0 is never
// assigned, so an idle transmitter (which sends all-zero bits) reads as "no packet".
// The 7-chip width, 3-bit IDs and the 7-node limit follow the document; the choice of
// m-sequence, the chip order and the reserved ID 0 are this design's own.
package cdma_pkg;

  localparam int unsigned CODE_LEN = 7;   // chips per codeword (7-bit PN codeword)
  localparam int unsigned MAX_NODES = 7;  // nodes per subnetwork / hubnetwork
  localparam int unsigned ID_W = 3;       // destination / source / subnet ID width
  localparam int unsigned CNT_W = 3;      // width of the demodulator's ones counter
  localparam int unsigned ACK_LEN = ID_W + 1;  // ACK packet: {source ID, ACK/NACK bit}

  localparam logic [ID_W-1:0] NO_ID = '0;  // ID 0: idle / no packet

  typedef logic [CODE_LEN-1:0] code_t;
  typedef logic [ID_W-1:0] node_id_t;

  // m-sequence 1,1,1,0,1,0,0 with chip j stored in bit j
  localparam code_t PN_BASE = 7'b0010111;

  // Codeword of node 'id' (1..7): the m-sequence rotated by id-1 chips, so that
  // chip j of node id is PN_BASE[(j + id - 1) mod 7].
  function automatic code_t pn_code(input int unsigned id);
    code_t c;
    for (int unsigned j = 0; j < CODE_LEN; j++) begin
      c[j] = PN_BASE[(j + id + CODE_LEN - 1) % CODE_LEN];
    end
    return c;
  endfunction

  // Timing strobes one synchronizer hands to every CNI on one channel.
  typedef struct packed {
    logic chip_en;   // channel sync: one chip-period tick
    logic tx_start;  // packet sync: transmitters start a packet after this tick
    logic rx_start;  // packet sync: first bit of a packet reaches the receivers in this tick
  } sync_t;

endpackage
