// atomi_pkg - shared types and constants of the AtomiBus II logic.
//
// The bus has 9 general purpose IO lines, which also carry the address, and
// three control lines: ADDR (address set, the only mandatory line), SET and
// ACK. All lines are modelled as open-drain, active-low, wired-AND nets with
// pull-ups: an object never drives a line high, it only asks for it to be
// pulled low (the *_pull fields of drive_t), and the bus module resolves the
// level every object sees (bus_t). Line counts follow the bus definition; the
// command and response records of the bus master and the first-byte format
// of a variable access are this design's own choice.
package atomi_pkg;

  localparam int unsigned IO_W   = 9;  // shared IO/address lines
  localparam int unsigned ADDR_W = 8;  // object number width (256 objects)
  localparam int unsigned DATA_W = 8;  // parallel transfer width
  localparam int unsigned IDX_W  = 7;  // variable index carried in a command byte
  localparam int unsigned NCH    = 4;  // channels of a passive object's switch

  // Level of every bus line as seen by an object (1 = high, released).
  typedef struct packed {
    logic [IO_W-1:0] io;
    logic            addr_n;
    logic            set_n;
  } bus_t;

  // Pull-low requests of one object. ack_pull acts on the object's own
  // (upstream) ACK segment.
  typedef struct packed {
    logic [IO_W-1:0] io_pull;
    logic            addr_pull;
    logic            set_pull;
    logic            ack_pull;
  } drive_t;

  localparam drive_t DRIVE_NONE = '0;

  // What an active object's bus master is asked to do after addressing.
  typedef enum logic [1:0] {
    OP_GET = 2'd0,  // read one variable of the addressed object
    OP_SET = 2'd1,  // write one variable of the addressed object
    OP_PIO = 2'd2   // passive object: drive a pattern, then sample the IO lines
  } op_e;

  typedef struct packed {
    logic [IO_W-1:0]   sel;      // IO pattern during the address phase
    op_e               op;
    logic [IDX_W-1:0]  idx;      // variable index (GET/SET)
    logic [IO_W-1:0]   wdata;    // SET: data byte in [7:0]; PIO: IO pattern, 1 = released
    logic [7:0]        pio_len;  // PIO: clocks of bus activity before sampling
  } cmd_t;

  typedef struct packed {
    logic [IO_W-1:0] rdata;      // GET: byte in [7:0]; PIO: sampled IO lines
    logic            err;        // no acknowledge within the timeout
  } rsp_t;

  // First byte of a variable access: bit 7 = 1 for SET, 0 for GET.
  function automatic logic [DATA_W-1:0] cmd_byte(input op_e op, input logic [IDX_W-1:0] idx);
    return {op == OP_SET, idx};
  endfunction

  // Address-phase pattern for an 8-bit object number (IO[8] held low).
  function automatic logic [IO_W-1:0] byte_sel(input logic [ADDR_W-1:0] a);
    return {1'b0, a};
  endfunction

  // Address-phase pattern that selects the one-line objects on the given lines.
  function automatic logic [IO_W-1:0] line_sel(input logic [IO_W-1:0] lines);
    return lines;
  endfunction

endpackage
