// fb_pkg: types and constants shared by the filter bank processor.
//
// The processor is horizontally micro coded: every clock cycle the controller
// hands each data path one 22-bit control word that sets every data path
// control line directly.  The word is declared here as a packed struct whose
// fields follow the order of the control lines along the data path, RAM end
// first: 7 RAM address / index register control bits, memwrite, wrlatch,
// shiftsrc, the 3-bit shift field (holding 5 minus the number of places),
// inv1/inv2 (complementor), bsel1/bsel2 (adder B mux), and the active-low
// zeroa*, xmitacc*, accb*, xmitin2* followed by iobusen.  Field meanings
// follow the document; keeping the address field 7 bits wide in every
// configuration is this design's choice.
//
// CW_IDLE is the word the ROM output register holds after reset: no RAM
// write, shifter recirculating with shift 0, A and B inputs zero, the
// accumulator on the memory bus and no I/O.  Its bit values follow the
// controller's cleared state shown in the document's switch-level
// simulation.
package fb_pkg;

  localparam int unsigned CW_BITS   = 22;
  localparam int unsigned AF_BITS   = 7;   // RAM address / index control field
  localparam int unsigned SHIFT_LIMIT = 5; // barrel shifter shifts 0..5 places

  typedef struct packed {
    logic [AF_BITS-1:0] addr;      // RAM address or index register control
    logic               memwrite;  // 1 = write RAM, 0 = read
    logic               wrlatch;   // 1 = load write latch (acts one cycle later)
    logic               shiftsrc;  // 1 = shifter output, 0 = memory (acts one cycle later)
    logic [2:0]         nshift;    // 5 - number of places to shift right
    logic               inv1;      // with inv2=0: absolute value
    logic               inv2;      // invert
    logic               bsel1;     // adder B mux select, high bit
    logic               bsel2;     // adder B mux select, low bit
    logic               zeroa_n;   // 0 = adder A input is zero
    logic               xmitacc_n; // 0 = accumulator drives the memory bus
    logic               accb_n;    // 0 = accumulator drives the B input
    logic               xmitin2_n; // 0 = parallel input strobe / input on bus
    logic               iobusen;   // 1 = parallel output enabled
  } cw_t;

  localparam cw_t CW_IDLE = '{
    addr: '0, memwrite: 1'b0, wrlatch: 1'b0, shiftsrc: 1'b1, nshift: 3'd5,
    inv1: 1'b0, inv2: 1'b0, bsel1: 1'b0, bsel2: 1'b0, zeroa_n: 1'b0,
    xmitacc_n: 1'b0, accb_n: 1'b1, xmitin2_n: 1'b1, iobusen: 1'b0};

  // Index register control codes in the top two address field bits.
  localparam logic [1:0] AF_INDEX = 2'b11;  // 110aaaa index, 111xxxx step

endpackage
