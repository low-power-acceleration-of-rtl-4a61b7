// ahb_pkg: shared AHB-Lite types for every bus in the SoC.
// A master drives an ahb_m2s_t (address/control of the address phase plus
// HWDATA of the data phase); a slave answers with an ahb_s2m_t (HRDATA,
// HREADYOUT, HRESP). HSEL travels inside the request so that decoders and
// arbiters can pass one struct around. Only single NONSEQ transfers are
// generated in this design, so HBURST/HPROT/HMASTLOCK are not carried.
// The signal set is the AHB-Lite subset the thesis uses; the grouping into
// structs is this design's choice.
package ahb_pkg;
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE = 3'b000,
    HSIZE_HALF = 3'b001,
    HSIZE_WORD = 3'b010
  } hsize_e;

  typedef struct packed {
    logic        hsel;
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    hsize_e      hsize;
    logic [31:0] hwdata;   // data phase
  } ahb_m2s_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;   // HREADYOUT of a slave, HREADY seen by a master
    logic        hresp;    // 0 OKAY, 1 ERROR
  } ahb_s2m_t;

  localparam ahb_m2s_t AHB_M2S_IDLE = '{hsel: 1'b0, haddr: '0, htrans: HTRANS_IDLE,
                                        hwrite: 1'b0, hsize: HSIZE_WORD, hwdata: '0};
  localparam ahb_s2m_t AHB_S2M_OKAY = '{hrdata: '0, hready: 1'b1, hresp: 1'b0};

  // Byte lanes written by a transfer of the given size at the given address.
  function automatic logic [3:0] byte_enables(hsize_e size, logic [1:0] a);
    case (size)
      HSIZE_BYTE: return 4'b0001 << a;
      HSIZE_HALF: return a[1] ? 4'b1100 : 4'b0011;
      default:    return 4'b1111;
    endcase
  endfunction
endpackage
