// atomi_system - one AtomiBus II bus with a set of objects on it.
//
// Objects sit on the bus in daisy-chain order, which is also their priority
// for the bus:
//   0 .. N_ACTIVE-1  active objects: arbitration logic + bus master, clocked
//                    by clk_a (8 MHz MCUs in the reference system); their
//                    software is replaced by the command ports cmd_* / rsp_*;
//   N_ACTIVE         an object sharing a variable table, addressed by its
//                    8-bit number SLAVE_ADDR, with software-style address
//                    recognition, clocked by clk_p (a 4 MHz MCU);
//   N_ACTIVE + 1     a passive object selected by one IO line (PASSIVE_LINE);
//   N_ACTIVE + 2     a passive object selected by the 8-bit number
//                    PASSIVE_BYTE_ADDR.
// The passive objects switch IO[7:4] through to their module pins (pa_*,
// pb_*) while selected. All objects meet only on the shared open-drain lines
// resolved by atomibus, so the two clock domains talk through the SET/ACK
// handshake alone.
//
// The object types, the bus, its arbitration and the two addressing methods
// follow the document's framework; this particular mix of objects, their
// order and their addresses are this design's choice, modelled on the
// document's test setups (USB-, ADC-, DC-Motor-, IO- and GPS-objects).
//
// Ports are plain signals and packed arrays; `bus_o`, `ack_o` and `grant_o`
// bring the line levels out for observation.
//
// A lint tool reports a combinational loop through the bus lines: a passive
// object's address latch reads the IO lines and its switch pulls them. The
// loop is the real circuit's and is never active, because the latch is
// transparent only while ADDR is high and the switch is closed only while
// ADDR is low.
module atomi_system
  import atomi_pkg::*;
#(
  parameter int unsigned       N_ACTIVE          = 2,
  parameter logic [ADDR_W-1:0] SLAVE_ADDR        = 8'h21,
  parameter int unsigned       PASSIVE_LINE      = 2,
  parameter logic [ADDR_W-1:0] PASSIVE_BYTE_ADDR = 8'h42,
  parameter int unsigned       ADDR_HOLD         = 24,
  parameter int unsigned       RESP_CYCLES       = 12,
  localparam int unsigned      NOBJ              = N_ACTIVE + 3
) (
  input  logic                    clk_a,
  input  logic                    clk_p,
  input  logic                    rst_n,
  // active objects
  input  logic [N_ACTIVE-1:0]     cmd_valid,
  output logic [N_ACTIVE-1:0]     cmd_ready,
  input  cmd_t [N_ACTIVE-1:0]     cmd,
  output logic [N_ACTIVE-1:0]     rsp_valid,
  output rsp_t [N_ACTIVE-1:0]     rsp,
  output logic [N_ACTIVE-1:0]     grant_o,
  // variable-table object, local side
  input  logic                    var_we,
  input  logic [IDX_W-1:0]        var_idx,
  input  logic [DATA_W-1:0]       var_wdata,
  output logic [DATA_W-1:0]       var_rdata,
  output logic                    var_bus_wr,
  output logic                    var_selected,
  // passive objects, module side
  input  logic [NCH-1:0]          pa_mod_pull,
  output logic [NCH-1:0]          pa_mod_in,
  output logic                    pa_cs,
  input  logic [NCH-1:0]          pb_mod_pull,
  output logic [NCH-1:0]          pb_mod_in,
  output logic                    pb_cs,
  // observation
  output bus_t                    bus_o,
  output logic [NOBJ-1:0]         ack_o
);

  bus_t                bus;
  drive_t [NOBJ-1:0]   drv;
  logic   [NOBJ-1:0]   ack_cut;
  logic   [NOBJ-1:0]   ack_seg;

  atomibus #(.NOBJ(NOBJ)) u_bus (
    .drv    (drv),
    .ack_cut(ack_cut),
    .bus    (bus),
    .ack_seg(ack_seg)
  );

  for (genvar i = 0; i < N_ACTIVE; i++) begin : g_active
    logic   req, grant, set_pull_arb;
    drive_t mdrv;

    atomi_arbiter u_arb (
      .clk     (clk_a),
      .rst_n   (rst_n),
      .req     (req),
      .addr_n  (bus.addr_n),
      .set_n   (bus.set_n),
      .ack_in_n(ack_seg[i]),
      .grant   (grant),
      .set_pull(set_pull_arb),
      .ack_cut (ack_cut[i])
    );

    atomi_bus_master #(.ADDR_HOLD(ADDR_HOLD)) u_master (
      .clk      (clk_a),
      .rst_n    (rst_n),
      .cmd_valid(cmd_valid[i]),
      .cmd_ready(cmd_ready[i]),
      .cmd      (cmd[i]),
      .rsp_valid(rsp_valid[i]),
      .rsp      (rsp[i]),
      .bus      (bus),
      .ack_in_n (ack_seg[i]),
      .grant    (grant),
      .req      (req),
      .drv      (mdrv)
    );

    always_comb begin
      drv[i]          = mdrv;
      drv[i].set_pull = mdrv.set_pull | set_pull_arb;
    end
    assign grant_o[i] = grant;
  end

  // Variable-table object.
  atomi_var_table_slave #(
    .RESP_CYCLES(RESP_CYCLES),
    .MY_ADDR    (SLAVE_ADDR)
  ) u_vars (
    .clk      (clk_p),
    .rst_n    (rst_n),
    .bus      (bus),
    .drv      (drv[N_ACTIVE]),
    .loc_we   (var_we),
    .loc_idx  (var_idx),
    .loc_wdata(var_wdata),
    .loc_rdata(var_rdata),
    .bus_wr   (var_bus_wr),
    .selected (var_selected)
  );
  assign ack_cut[N_ACTIVE] = 1'b0;

  // Passive objects never pull ADDR, SET or ACK and never cut the chain.
  logic [IO_W-1:0] pa_pull, pb_pull;

  atomi_passive_object #(.BYTE_MODE(1'b0), .SEL_LINE(PASSIVE_LINE)) u_pa (
    .bus(bus), .io_pull(pa_pull), .mod_pull(pa_mod_pull), .mod_in(pa_mod_in), .cs(pa_cs)
  );
  atomi_passive_object #(.BYTE_MODE(1'b1), .MY_ADDR(PASSIVE_BYTE_ADDR)) u_pb (
    .bus(bus), .io_pull(pb_pull), .mod_pull(pb_mod_pull), .mod_in(pb_mod_in), .cs(pb_cs)
  );

  always_comb begin
    drv[N_ACTIVE+1]         = DRIVE_NONE;
    drv[N_ACTIVE+1].io_pull = pa_pull;
    drv[N_ACTIVE+2]         = DRIVE_NONE;
    drv[N_ACTIVE+2].io_pull = pb_pull;
  end
  assign ack_cut[N_ACTIVE+2:N_ACTIVE+1] = '0;

  assign bus_o = bus;
  assign ack_o = ack_seg;

endmodule
