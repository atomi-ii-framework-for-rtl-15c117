// atomi_var_table_slave - the variable table an object shares on the bus
// (its part of the virtual shared memory), with software-style address
// recognition.
//
// Other objects reach a variable by object number and variable index, as in
// Object[2].Variable[1] = 10: they address the object with its 8-bit number
// on IO[7:0] and ADDR low, then send a command byte {op, idx} (op = 1 for SET,
// 0 for GET) followed by one data byte, written by the master for SET and
// returned by this object for GET. Several command/data pairs may follow one
// addressing; the object leaves the transaction when ADDR goes high. The
// object's own function (a motor controller, say) uses the local port:
// combinational read, write on `loc_we`, which wins over a bus SET to the same
// variable in the same clock. Indices outside the table read as 0 and ignore
// writes.
//
// Address recognition imitates an interrupt routine on a small MCU: ADDR is
// synchronised, and the IO lines are read a fixed time later. With the default
// RESP_CYCLES = 12 the address is read RESP_CYCLES - 4 = 8 clocks after the
// state machine sees the synchronised ADDR low, which is more than 10 and at
// most 11 clocks after the edge itself: inside the 12 clocks (3 us at 4 MHz)
// for which masters keep the address on the bus.
//
// Byte handshake, seen from here: wait for SET low (synchronised), take or
// put the byte on IO[7:0] and pull ACK low, wait for SET high, release ACK.
//
// The shared variable table, GET/SET access by object number and index, the
// 8 - 12 clock software response and the 3 us hold follow the document; the
// table size, the command-byte format and the handshake order are this
// design's own choices.
module atomi_var_table_slave
  import atomi_pkg::*;
#(
  parameter int unsigned N_VARS      = 16,
  parameter int unsigned RESP_CYCLES = 12,
  parameter logic [ADDR_W-1:0] MY_ADDR = 8'h21
) (
  input  logic              clk,
  input  logic              rst_n,
  // bus side
  input  bus_t              bus,
  output drive_t            drv,
  // local side
  input  logic              loc_we,
  input  logic [IDX_W-1:0]  loc_idx,
  input  logic [DATA_W-1:0] loc_wdata,
  output logic [DATA_W-1:0] loc_rdata,
  output logic              bus_wr,   // one-clock pulse: a bus SET wrote a variable
  output logic              selected  // this object is addressed
);

  localparam int unsigned SAMPLE_AT = (RESP_CYCLES > 4) ? RESP_CYCLES - 4 : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT, S_UNSEL, S_CMD_WAIT, S_CMD_ACK, S_DATA_WAIT, S_DATA_ACK
  } state_e;

  state_e            state;
  logic              addr_s, set_s;
  logic [7:0]        cnt;
  logic [DATA_W-1:0] cmd;
  logic [DATA_W-1:0] rd_byte;
  logic [DATA_W-1:0] vars [N_VARS];

  atomi_sync2 u_addr_sync (.clk, .rst_n, .d(bus.addr_n), .q(addr_s));
  atomi_sync2 u_set_sync  (.clk, .rst_n, .d(bus.set_n),  .q(set_s));

  logic [IDX_W-1:0] cmd_idx;
  logic             cmd_is_set;
  assign cmd_idx    = cmd[IDX_W-1:0];
  assign cmd_is_set = cmd[DATA_W-1];

  function automatic logic [DATA_W-1:0] rd_var(input logic [IDX_W-1:0] i);
    logic [DATA_W-1:0] v;
    v = '0;
    for (int k = 0; k < N_VARS; k++) if (IDX_W'(k) == i) v = vars[k];
    return v;
  endfunction

  assign loc_rdata = rd_var(loc_idx);

  logic             bus_we;
  logic [DATA_W-1:0] bus_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      cmd     <= '0;
      rd_byte <= '0;
      bus_wr  <= 1'b0;
      bus_we  <= 1'b0;
      bus_wdata <= '0;
    end else begin
      bus_wr <= 1'b0;
      bus_we <= 1'b0;
      if (addr_s && state != S_IDLE) begin
        state <= S_IDLE;                 // transaction over
      end else begin
        case (state)
          S_IDLE: if (!addr_s) begin cnt <= '0; state <= S_WAIT; end
          S_WAIT: begin
            cnt <= cnt + 1'b1;
            if (cnt + 1 >= 8'(SAMPLE_AT))
              state <= (bus.io[ADDR_W-1:0] == MY_ADDR) ? S_CMD_WAIT : S_UNSEL;
          end
          S_UNSEL: ;                      // wait for ADDR high
          S_CMD_WAIT: if (!set_s) begin
            cmd   <= bus.io[DATA_W-1:0];
            state <= S_CMD_ACK;
          end
          S_CMD_ACK: if (set_s) state <= S_DATA_WAIT;
          S_DATA_WAIT: if (!set_s) begin
            if (cmd_is_set) begin
              bus_we    <= 1'b1;
              bus_wdata <= bus.io[DATA_W-1:0];
              bus_wr    <= (32'(cmd_idx) < N_VARS);
            end else begin
              rd_byte <= rd_var(cmd_idx);
            end
            state <= S_DATA_ACK;
          end
          S_DATA_ACK: if (set_s) state <= S_CMD_WAIT;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Variable storage; the local port has priority.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_VARS; k++) vars[k] <= '0;
    end else begin
      for (int k = 0; k < N_VARS; k++) begin
        if (loc_we && loc_idx == IDX_W'(k))
          vars[k] <= loc_wdata;
        else if (bus_we && cmd_idx == IDX_W'(k))
          vars[k] <= bus_wdata;
      end
    end
  end

  assign selected = (state == S_CMD_WAIT) || (state == S_CMD_ACK) ||
                    (state == S_DATA_WAIT) || (state == S_DATA_ACK);

  always_comb begin
    drv = DRIVE_NONE;
    if (state == S_CMD_ACK || state == S_DATA_ACK) drv.ack_pull = 1'b1;
    if (state == S_DATA_ACK && !cmd_is_set) drv.io_pull = {1'b0, ~rd_byte};
  end

endmodule
