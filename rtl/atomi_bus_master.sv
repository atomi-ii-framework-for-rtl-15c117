// atomi_bus_master - bus logic of an active object: reserve, address,
// transfer, release.
//
// One command runs one bus transaction:
//   1. REQ    release BUS_REQ (`req`) and wait until the arbitration node
//             (`grant`) has been high for two clocks in a row;
//   2. SETUP  put the address pattern `cmd.sel` on the IO lines for one clock;
//   3. HOLD   lower ADDR and keep the pattern on the IO lines for ADDR_HOLD
//             clocks, so that objects that recognise their address in
//             software have time to read it; BUS_REQ is driven low again,
//             ADDR low now keeps the bus reserved;
//   4. transfer, by command:
//        OP_SET  write the command byte {1, idx}, then the data byte;
//        OP_GET  write the command byte {0, idx}, then read one byte;
//        OP_PIO  drive `cmd.wdata` on the IO lines (1 = released) for
//                `cmd.pio_len` clocks, then sample all nine IO lines - the
//                access method of a passive object;
//   5. raise ADDR and report on `rsp`.
// A byte moves with a four-phase handshake on the SET and ACK lines: the
// master lowers SET (with the data on IO[7:0] when it writes), the addressed
// object lowers ACK (with its data on IO[7:0] when it answers a read), the
// master raises SET, the object raises ACK. Every step waits for the other
// side, so objects of any speed can talk. ACK is synchronised into this
// clock domain before it is used. If ACK does not change within ACK_TIMEOUT
// clocks the transaction ends with `rsp.err` set.
//
// The reserve-address-release sequence, the address hold requirement and the
// flow-controlled 8-bit transfer on SET/ACK follow the bus definition; the
// default ADDR_HOLD of 24 clocks is 3 us at an 8 MHz object clock, the hold
// time found for the slowest software-addressed object. The handshake order,
// the command-byte format, the PIO command and the timeout are this design's
// own choices, since the definition names the transfer protocol without
// giving its cycle.
//
// Interface: valid/ready command input (taken in IDLE), one-clock `rsp_valid`
// pulse with the result. Bus side: line levels in, pull requests out.
module atomi_bus_master
  import atomi_pkg::*;
#(
  parameter int unsigned ADDR_HOLD   = 24,
  parameter int unsigned ACK_TIMEOUT = 1024
) (
  input  logic   clk,
  input  logic   rst_n,
  // command side
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  cmd_t   cmd,
  output logic   rsp_valid,
  output rsp_t   rsp,
  // bus side
  input  bus_t   bus,
  input  logic   ack_in_n,
  input  logic   grant,
  output logic   req,
  output drive_t drv
);

  typedef enum logic [3:0] {
    S_IDLE, S_REQ, S_SETUP, S_HOLD, S_PIO,
    S_WR_STB, S_WR_REL, S_RD_STB, S_RD_REL, S_END
  } state_e;

  state_e           state;
  cmd_t             c;
  logic             second;      // second byte of a GET/SET
  logic [15:0]      cnt;
  logic             grant_seen;
  logic             ack_s;
  logic [IO_W-1:0]  rdata;
  logic             err;

  atomi_sync2 u_ack_sync (.clk, .rst_n, .d(ack_in_n), .q(ack_s));

  logic [DATA_W-1:0] wr_byte;
  assign wr_byte = second ? c.wdata[DATA_W-1:0] : cmd_byte(c.op, c.idx);

  logic timeout;
  assign timeout = (cnt >= 16'(ACK_TIMEOUT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      c          <= '0;
      second     <= 1'b0;
      cnt        <= '0;
      grant_seen <= 1'b0;
      rdata      <= '0;
      err        <= 1'b0;
      rsp_valid  <= 1'b0;
      rsp        <= '0;
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        S_IDLE: if (cmd_valid) begin
          c          <= cmd;
          second     <= 1'b0;
          err        <= 1'b0;
          rdata      <= '0;
          grant_seen <= 1'b0;
          state      <= S_REQ;
        end
        S_REQ: begin
          // Two clocks of grant: a downstream object that asked in the same
          // clock as an upstream one loses its grant after one.
          grant_seen <= grant;
          if (grant && grant_seen) state <= S_SETUP;
        end
        S_SETUP: begin
          cnt   <= '0;
          state <= S_HOLD;
        end
        S_HOLD: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1 >= 16'(ADDR_HOLD)) begin
            cnt   <= '0;
            state <= (c.op == OP_PIO) ? S_PIO : S_WR_STB;
          end
        end
        S_PIO: begin
          cnt <= cnt + 1'b1;
          if (cnt >= 16'(c.pio_len)) begin
            rdata <= bus.io;
            state <= S_END;
          end
        end
        S_WR_STB: begin
          cnt <= cnt + 1'b1;
          if (!ack_s) begin
            cnt <= '0; state <= S_WR_REL;
          end else if (timeout) begin
            err <= 1'b1; state <= S_END;
          end
        end
        S_WR_REL: begin
          cnt <= cnt + 1'b1;
          if (ack_s) begin
            cnt <= '0;
            if (second) state <= S_END;
            else begin
              second <= 1'b1;
              state  <= (c.op == OP_SET) ? S_WR_STB : S_RD_STB;
            end
          end else if (timeout) begin
            err <= 1'b1; state <= S_END;
          end
        end
        S_RD_STB: begin
          cnt <= cnt + 1'b1;
          if (!ack_s) begin
            rdata <= {1'b0, bus.io[DATA_W-1:0]};
            cnt   <= '0; state <= S_RD_REL;
          end else if (timeout) begin
            err <= 1'b1; state <= S_END;
          end
        end
        S_RD_REL: begin
          cnt <= cnt + 1'b1;
          if (ack_s) begin
            cnt <= '0; state <= S_END;
          end else if (timeout) begin
            err <= 1'b1; state <= S_END;
          end
        end
        S_END: begin
          // ADDR is released in this clock; report the result.
          rsp_valid <= 1'b1;
          rsp       <= '{rdata: rdata, err: err};
          cnt       <= '0;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cmd_ready = (state == S_IDLE);
  assign req       = (state == S_REQ) || (state == S_SETUP);

  always_comb begin
    drv = DRIVE_NONE;
    unique case (state)
      S_SETUP, S_HOLD: begin
        drv.io_pull   = ~c.sel;
        drv.addr_pull = (state == S_HOLD);
      end
      S_PIO: begin
        drv.io_pull   = ~c.wdata;
        drv.addr_pull = 1'b1;
      end
      S_WR_STB: begin
        drv.io_pull   = {1'b0, ~wr_byte};
        drv.set_pull  = 1'b1;
        drv.addr_pull = 1'b1;
      end
      S_RD_STB: begin
        drv.set_pull  = 1'b1;
        drv.addr_pull = 1'b1;
      end
      S_WR_REL, S_RD_REL: drv.addr_pull = 1'b1;
      default: ;
    endcase
  end

endmodule
