// fb_dpm_top: FASTBUS dual-port memory and display diagnostic module.
//
// A FASTBUS slave reachable from two segments at once: the crate segment
// (port 1, through four ADI slices) and a cable segment (port 2, through the
// cable auxiliary card, whose receiver outputs and driver inputs are this
// module's cable_m and cable_s ports). Each port has its own CSR space and
// can read the other's. Both share one data space, a fast 256 x 32 memory
// followed by a slow 16K x 32 memory, granted first come first served by the
// contention logic; the port held off sees WT. A display unit monitors
// either segment, can stop it with WT on a chosen timing edge and shows the
// live or latched segment state on the front-panel LEDs.
//
// All bus lines are sampled on clk (10 ns by default); the fast and slow
// memory accesses take 1 and 10 clocks. The port structure, the memories,
// contention and display follow the document; the synchronous bus model is
// this design's choice. The segment snapshots shown by the display combine
// the master's lines, the arbitration grant inputs and this module's own
// responses (other slaves' AK, DK and SS are not visible to it).
module fb_dpm_top
  import fb_pkg::*;
#(
  parameter int unsigned FAST_WORDS     = FAST_DEPTH,
  parameter int unsigned SLOW_WORDS     = SLOW_DEPTH,
  parameter int unsigned FAST_W         = FAST_CYCLES,
  parameter int unsigned SLOW_W         = SLOW_CYCLES,
  parameter int unsigned FIFO_DEPTH     = 4,
  parameter int unsigned MAX_AUTO_DELAY = 1_000_000_000 / CLK_PERIOD_NS,
  localparam int unsigned DW = $clog2(MAX_AUTO_DELAY + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // crate segment (port 1)
  input  fb_master_t    crate_m,
  input  logic [4:0]    crate_ga,
  input  logic          crate_ag,
  output fb_slave_t     crate_s,
  // cable segment (port 2), at the auxiliary connector
  input  fb_master_t    cable_m,
  input  logic [4:0]    cable_ga,
  input  logic          cable_ag,
  output fb_slave_t     cable_s,
  // front panel
  input  logic          disp_bus_sel,
  input  logic [4:0]    disp_trig_mask,
  input  logic          disp_edge_p,
  input  logic          disp_edge_n,
  input  logic          disp_en_wt_gen,
  input  logic          disp_led_sel,
  input  logic          disp_man_reset,
  input  logic          disp_auto_reset,
  input  logic [DW-1:0] disp_auto_delay,
  output fb_snapshot_t  disp_leds,
  output logic          disp_iwt_led,
  // error counters (CSR#1 of each port)
  output logic [7:0]    crate_err_cnt,
  output logic [7:0]    cable_err_cnt
);

  fb_slave_t   p_s   [2];
  ds_req_t     p_req [2];
  csr2_t       p_csr2[2];
  logic [31:0] csr_a [4];
  logic [31:0] csr_b [4];
  logic [1:0]  need, grant, cwt;
  logic        busy_crate, busy_cable;
  logic        view_req, view_valid;
  ds_req_t     dreq;
  logic [DATA_W-1:0] ds_rdata;
  logic        ds_wrapped, ds_a14, ds_next_fast;
  logic [MAR_W-1:0] ds_mar;
  logic        dwt_crate, dwt_cable, dtrig;
  fb_snapshot_t snap_crate, snap_cable;

  fb_port #(.IS_CABLE(1'b0), .FIFO_DEPTH(FIFO_DEPTH), .FAST_W(FAST_W), .SLOW_W(SLOW_W)) u_crate (
    .clk, .rst_n,
    .m(crate_m), .ga(crate_ga), .s(p_s[0]),
    .ds_need(need[0]), .ds_grant(grant[0]), .ds_wt(cwt[0]), .dreq(p_req[0]),
    .ds_rdata, .ds_wrapped, .ds_mar, .ds_a14,
    .csr_out(csr_a), .other_csr(csr_b), .csr2(p_csr2[0]), .busy(busy_crate),
    .la_view_req(), .la_view_req_in(view_req), .la_view_valid(view_valid),
    .la_view_ok(1'b0), .err_cnt(crate_err_cnt)
  );

  fb_port #(.IS_CABLE(1'b1), .FIFO_DEPTH(FIFO_DEPTH), .FAST_W(FAST_W), .SLOW_W(SLOW_W)) u_cable (
    .clk, .rst_n,
    .m(cable_m), .ga(cable_ga), .s(p_s[1]),
    .ds_need(need[1]), .ds_grant(grant[1]), .ds_wt(cwt[1]), .dreq(p_req[1]),
    .ds_rdata, .ds_wrapped, .ds_mar, .ds_a14,
    .csr_out(csr_b), .other_csr(csr_a), .csr2(p_csr2[1]), .busy(busy_cable),
    .la_view_req(view_req), .la_view_req_in(1'b0), .la_view_valid(),
    .la_view_ok(view_valid), .err_cnt(cable_err_cnt)
  );

  contention_logic u_cont (.clk, .rst_n, .req(need), .grant(grant), .wt(cwt));

  // Data multiplexer: the owner of the data space drives it.
  always_comb begin
    dreq = grant[1] ? p_req[1] : p_req[0];
  end

  data_space #(.FAST_WORDS(FAST_WORDS), .SLOW_WORDS(SLOW_WORDS)) u_ds (
    .clk, .rst_n,
    .req      (dreq),
    .slow_off (grant[1] ? p_csr2[1].slow_off : p_csr2[0].slow_off),
    .fast_off (grant[1] ? p_csr2[1].fast_off : p_csr2[0].fast_off),
    .rdata    (ds_rdata),
    .wrapped  (ds_wrapped),
    .mar      (ds_mar),
    .a14      (ds_a14),
    .next_fast(ds_next_fast)
  );

  // Segment state as the display unit sees it.
  always_comb begin
    snap_crate = '{ag: crate_ag, as: crate_m.as, ak: p_s[0].ak, ds: crate_m.ds,
                   dk: p_s[0].dk, wt: crate_s.wt, eg: crate_m.eg, rd: crate_m.rd,
                   ms: crate_m.ms, ss: p_s[0].ss,
                   ad: p_s[0].ad_oe ? p_s[0].ad : crate_m.ad};
    snap_cable = '{ag: cable_ag, as: cable_m.as, ak: p_s[1].ak, ds: cable_m.ds,
                   dk: p_s[1].dk, wt: cable_s.wt, eg: cable_m.eg, rd: cable_m.rd,
                   ms: cable_m.ms, ss: p_s[1].ss,
                   ad: p_s[1].ad_oe ? p_s[1].ad : cable_m.ad};
  end

  display_logic #(.MAX_AUTO_DELAY(MAX_AUTO_DELAY)) u_disp (
    .clk, .rst_n,
    .crate_bus (snap_crate),
    .cable_bus (snap_cable),
    .bus_sel   (disp_bus_sel),
    .trig_mask (disp_trig_mask),
    .edge_p    (disp_edge_p),
    .edge_n    (disp_edge_n),
    .en_wt_gen (disp_en_wt_gen),
    .led_sel   (disp_led_sel),
    .man_reset (disp_man_reset),
    .auto_reset(disp_auto_reset),
    .auto_delay(disp_auto_delay),
    .leds      (disp_leds),
    .iwt       (disp_iwt_led),
    .wt_crate  (dwt_crate),
    .wt_cable  (dwt_cable),
    .trigger   (dtrig)
  );

  // WT on each segment: the port's own wait or the display's.
  always_comb begin
    crate_s    = p_s[0];
    crate_s.wt = p_s[0].wt || dwt_crate;
    cable_s    = p_s[1];
    cable_s.wt = p_s[1].wt || dwt_cable;
  end

endmodule
