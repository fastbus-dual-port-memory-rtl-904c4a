// fb_port: one FASTBUS slave port of the dual-port memory module: the
// general control and timing, CSR space, error detection, parity generation
// and read logic of either the crate port (IS_CABLE = 0) or the cable port
// (IS_CABLE = 1).
//
// Address cycle. On a rising AS the port latches AD, MS, EG and PA. MS<0>
// picks CSR space (1) or data space (0), MS<1> marks a broadcast, MS<2> set
// is not answered. With EG high the port is selected when AD<7:0> equals its
// geographic address; with EG low, when logical addressing is enabled
// (CSR#0 bit 1) and AD<31:16> equals the module address of CSR#3. A
// broadcast selects the port whatever the address. A selected port raises
// AK, and keeps it until AS falls. Under logical addressing the low part of
// AD is the internal address (IA); under geographic addressing or broadcast
// the IA starts at zero and is set by a secondary-address cycle. An address
// with a parity error (when checking is on) is ignored and counted.
//
// Data cycles. Each DS edge while attached is queued with its MS, RD, AD
// and PA (FIFO_DEPTH entries, so a pipelining master may run ahead of DK).
// Entries are served in order; each ends by setting DK to the level DS took.
// A rising DS edge always transfers a word; a falling edge only in a block
// transfer (MS=1), as with the one-shot's P and N inputs. MS<1:0>=0 is a
// random access, 1 a block transfer (the memory address advances after each
// word) and 2 a secondary address cycle (write or read the IA). The access
// lasts one pulse of the access clock generator: FAST_W cycles for CSR space
// and the fast memory, SLOW_W cycles for the slow memory.
//
// Status on SS with each DK: 2 on the block-transfer word at which the data
// space wraps around, 7 for a parity error in data space, 6 in CSR space, 7
// for an invalid IA and for a write to the other port's CSR space; 0
// otherwise. A parity error also raises PE and advances the error counter.
//
// Sharing. While attached in data space the port asks the contention logic
// for the data space (ds_need). A data transfer waits for ds_grant, and the
// port shows WT while it waits. CSR space: the port always owns its own
// registers and may read the other port's (IA bit 2 = 1), except that the
// cable port may read the crate port's CSR#3 only while the crate port is
// idle, since that register sits in the crate port's ADI slices; it waits
// with WT until the crate port grants the view (la_view_valid).
//
// In the crate port the AD lines, the address latch, the address
// comparators, address parity and CSR#3 are those of four fma601_adi
// slices; the cable port does the same with plain registers. From the
// document: the protocol functions and SS codes, the CSR layout, the
// first-come-first-serve sharing and the CSR#3 exception, the two pulse
// widths and their triggering. The synchronous sampling, the edge queue,
// the IA bit that selects the other port's CSRs and the broadcast and
// parity-error handling of address cycles are this design's choices.
module fb_port
  import fb_pkg::*;
#(
  parameter bit          IS_CABLE   = 1'b0,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned FAST_W     = FAST_CYCLES,
  parameter int unsigned SLOW_W     = SLOW_CYCLES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fb_master_t        m,
  input  logic [4:0]        ga,
  output fb_slave_t         s,
  // shared data space
  output logic              ds_need,
  input  logic              ds_grant,
  input  logic              ds_wt,
  output ds_req_t           dreq,
  input  logic [DATA_W-1:0] ds_rdata,
  input  logic              ds_wrapped,
  input  logic [MAR_W-1:0]  ds_mar,
  input  logic              ds_a14,
  // CSR space of both ports
  output logic [31:0]       csr_out   [4],
  input  logic [31:0]       other_csr [4],
  output csr2_t             csr2,
  output logic              busy,
  output logic              la_view_req,    // cable port: wants crate CSR#3
  input  logic              la_view_req_in, // crate port: cable port asks
  output logic              la_view_valid,  // crate port: CSR#3 is shown
  input  logic              la_view_ok,     // cable port: crate CSR#3 shown
  output logic [7:0]        err_cnt
);

  typedef enum logic [2:0] {P_IDLE, P_DECODE, P_NOSEL, P_ATT, P_EXEC} pstate_t;

  typedef struct packed {
    logic        rise;
    logic [2:0]  ms;
    logic        rd;
    logic [31:0] ad;
    logic        pa;
  } dcyc_t;

  localparam int unsigned PW = $clog2(FIFO_DEPTH);

  pstate_t     state;
  logic        as_q, ds_q;
  logic [31:0] addr_l;
  logic [2:0]  ms_l;
  logic        eg_l, pa_l, apar_l;
  logic        space_csr;
  logic [31:0] ia;
  logic        ia_ok, ia_dirty;

  dcyc_t       fifo [FIFO_DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0] count;
  dcyc_t       head;
  logic        empty, push, pop;

  logic        as_rise, attached;
  logic        sel_match, la_match, ga_match, apar_err;
  logic        h_xfer, h_sec, h_block, h_data, h_write, h_other_r3;
  logic        hold, start;

  // pending operation during P_EXEC
  logic        op_data, op_read, op_block;
  logic [31:0] op_rdata;
  logic [2:0]  op_ss;
  logic        op_pe;

  logic [31:0] rd_q;
  logic        drive_q;
  logic        dk_q, pe_q;
  logic [2:0]  ss_q;

  // CSR and error detection
  logic        csr_we, la_en, ec_en, err_inc;
  logic [15:0] ma, ma_view;
  logic        perr, perr_cnt;
  logic [2:0]  perr_ss;

  // access clock
  logic        ck_fire, ck_wide, ck_ick, ck_done;

  // crate-port CSR#3 access through the ADI slices
  logic        la_wr, la_rd_own, la_rd_any;

  assign as_rise  = m.as && !as_q;
  assign attached = (state == P_ATT) || (state == P_EXEC);
  assign busy     = (state != P_IDLE);
  assign head     = fifo[rp];
  assign empty    = (count == 0);

  // ---------------------------------------------------------------- decode
  always_comb begin
    h_sec      = head.ms[1:0] == MS_SECONDARY;
    h_block    = head.ms[1:0] == MS_BLOCK;
    h_xfer     = head.rise || h_block;
    h_write    = !head.rd;
    h_data     = !space_csr && !h_sec && ia_ok;
    h_other_r3 = space_csr && !h_sec && ia_ok && head.rd && ia[2] && ia[1:0] == 2'd3;
    hold       = (state == P_ATT) && !empty && h_xfer &&
                 ((h_data && !ds_grant) ||
                  (IS_CABLE && h_other_r3 && !la_view_ok));
    start      = (state == P_ATT) && !empty && !hold;
    la_view_req = IS_CABLE && (state == P_ATT) && !empty && h_xfer && h_other_r3;
  end

  // Parity of the word being used: only words the port writes somewhere.
  error_detect u_err (
    .strobe   (start && h_xfer && h_write),
    .check_en (csr2.par_chk),
    .csr_space(space_csr),
    .ad       (head.ad),
    .pa       (head.pa),
    .perr     (perr),
    .err_count(perr_cnt),
    .ss       (perr_ss)
  );

  assign err_inc = perr_cnt || apar_err;

  // CSR write of the head entry
  assign csr_we = start && h_xfer && space_csr && !h_sec && ia_ok && h_write &&
                  !perr && !ia[2];
  assign la_wr     = !IS_CABLE && csr_we && ia[1:0] == 2'd3;
  assign la_rd_own = !IS_CABLE && start && h_xfer && space_csr && !h_sec && ia_ok &&
                     head.rd && !ia[2] && ia[1:0] == 2'd3;
  assign la_view_valid = !IS_CABLE && la_view_req_in && (state == P_IDLE) && !as_rise;
  assign la_rd_any = la_rd_own || la_view_valid;

  csr_regs #(.HAS_MA_REG(IS_CABLE)) u_csr (
    .clk, .rst_n,
    .we     (csr_we),
    .wsel   (ia[1:0]),
    .wdata  (head.ad),
    .err_inc(err_inc),
    .ma_ext (ma_view),
    .csr_out(csr_out),
    .la_en  (la_en),
    .ec_en  (ec_en),
    .csr2   (csr2),
    .ma     (ma),
    .err_cnt(err_cnt)
  );

  // ------------------------------------------------- address comparators
  generate
    if (!IS_CABLE) begin : g_adi
      logic [7:0] adi_out  [4];
      logic [7:0] adi_dout [4];
      logic [7:0] adi_la   [4];
      logic [3:0] adi_par, adi_valid;
      logic       gate_in, gate_di;

      assign gate_in = !(drive_q || la_wr || la_rd_any);
      assign gate_di = (drive_q && !la_rd_any) || la_wr;

      for (genvar i = 0; i < 4; i++) begin : g_slice
        fma601_adi u_adi (
          .clk, .rst_n,
          .ad_in        (m.ad[8*i +: 8]),
          .ad_out       (adi_out[i]),
          .gate_input   (gate_in),
          .gate_output  (drive_q && !la_rd_any),
          .parity       (adi_par[i]),
          .ga           (i == 0 ? {3'b000, ga} : 8'h00),
          .latch_ib     (as_rise && state == P_IDLE),
          .write_la     (la_wr && i >= 2),
          .read_la      (la_rd_any),
          .la_width_ctrl(i >= 2),
          .select_ga    (eg_l),
          .addr_valid   (adi_valid[i]),
          .data_in      (la_wr ? head.ad[8*i +: 8] : rd_q[8*i +: 8]),
          .gate_di      (gate_di),
          .invert_di    (1'b0),
          .data_out     (adi_dout[i]),
          .gate_do      (la_rd_any),
          .invert_do    (1'b0),
          .la_reg       (adi_la[i])
        );
      end

      assign ma_view  = {adi_dout[3], adi_dout[2]};
      assign la_match = &adi_valid;
      assign ga_match = adi_valid[0];
      assign s.ad     = {adi_out[3], adi_out[2], adi_out[1], adi_out[0]};

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                           apar_l <= 1'b0;
        else if (as_rise && state == P_IDLE)  apar_l <= ^adi_par;
      end
    end else begin : g_plain
      assign ma_view  = 16'h0000;
      assign la_match = addr_l[31:16] == ma;
      assign ga_match = addr_l[7:0] == {3'b000, ga};
      assign s.ad     = drive_q ? rd_q : 32'h0;

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                           apar_l <= 1'b0;
        else if (as_rise && state == P_IDLE)  apar_l <= even_parity(m.ad);
      end
    end
  endgenerate

  always_comb begin
    apar_err  = (state == P_DECODE) && csr2.par_chk && (apar_l != pa_l);
    sel_match = !ms_l[2] && !apar_err &&
                (ms_l[1] || (eg_l ? ga_match : (la_en && la_match)));
  end

  // ------------------------------------------------------ access clock
  access_clock_gen #(.FAST_W(FAST_W), .SLOW_W(SLOW_W)) u_ck (
    .clk, .rst_n,
    .ds_rise   (start && head.rise),
    .ds_fall   (start && !head.rise),
    .p_en      (attached),
    .n_en      (h_block),
    .data_space(h_data),
    .a14       (ia_dirty ? ia[14] : ds_a14),
    .slow_off  (csr2.slow_off),
    .fast_off  (csr2.fast_off),
    .fire      (ck_fire),
    .wide      (ck_wide),
    .ick       (ck_ick),
    .done      (ck_done)
  );

  // ------------------------------------------------ read data selection
  logic [1:0]  rl_src;
  logic [31:0] rl_data;
  logic [31:0] ia_view;

  always_comb begin
    ia_view = space_csr || ia_dirty ? ia : {17'b0, ds_a14, ds_mar};
    if (state == P_EXEC && op_data) rl_src = 2'd2;
    else if (h_sec)  rl_src = 2'd3;
    else if (ia[2])  rl_src = 2'd1;
    else             rl_src = 2'd0;
  end

  read_logic u_rl (
    .src      (rl_src),
    .reg_sel  (ia[1:0]),
    .own_csr  (csr_out),
    .other_csr(other_csr),
    .mem_data (ds_rdata),
    .ia       (ia_view),
    .rdata    (rl_data)
  );

  // ------------------------------------------------- data space request
  always_comb begin
    dreq       = '0;
    dreq.valid = start && h_xfer && h_data && !(h_write && perr);
    dreq.load  = ia_dirty;
    dreq.addr  = ia[IA_W-1:0];
    dreq.we    = h_write;
    dreq.wdata = head.ad;
    dreq.incr  = h_block;
  end

  assign ds_need = attached && !space_csr;

  // ---------------------------------------------------- edge queue
  assign push = attached && (m.ds != ds_q) && (count != (PW+1)'(FIFO_DEPTH));
  assign pop  = (state == P_ATT && start && !ck_fire) ||
                (state == P_EXEC && ck_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (!attached) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) begin
        fifo[wp] <= '{rise: m.ds, ms: m.ms, rd: m.rd, ad: m.ad, pa: m.pa};
        wp       <= (wp == PW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == PW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // ------------------------------------------------------ main sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      as_q      <= 1'b0;
      ds_q      <= 1'b0;
      addr_l    <= '0;
      ms_l      <= '0;
      eg_l      <= 1'b0;
      pa_l      <= 1'b0;
      space_csr <= 1'b0;
      ia        <= '0;
      ia_ok     <= 1'b0;
      ia_dirty  <= 1'b0;
      op_data   <= 1'b0;
      op_read   <= 1'b0;
      op_block  <= 1'b0;
      op_rdata  <= '0;
      op_ss     <= SS_OK;
      op_pe     <= 1'b0;
      rd_q      <= '0;
      drive_q   <= 1'b0;
      dk_q      <= 1'b0;
      pe_q      <= 1'b0;
      ss_q      <= SS_OK;
    end else begin
      as_q <= m.as;
      ds_q <= m.ds;
      unique case (state)
        P_IDLE: begin
          dk_q    <= 1'b0;
          ss_q    <= SS_OK;
          pe_q    <= 1'b0;
          drive_q <= 1'b0;
          if (as_rise) begin
            addr_l <= m.ad;
            ms_l   <= m.ms;
            eg_l   <= m.eg;
            pa_l   <= m.pa;
            state  <= P_DECODE;
          end
        end
        P_DECODE: begin
          if (!m.as) begin
            state <= P_IDLE;
          end else if (sel_match) begin
            space_csr <= ms_l[0];
            ia_dirty  <= 1'b1;
            if (eg_l || ms_l[1]) begin
              ia    <= '0;
              ia_ok <= 1'b1;
            end else begin
              ia    <= {16'h0000, addr_l[15:0]};
              ia_ok <= ms_l[0] ? csr_ia_ok({16'h0000, addr_l[15:0]})
                               : data_ia_ok({16'h0000, addr_l[15:0]});
            end
            state <= P_ATT;
          end else begin
            state <= P_NOSEL;
          end
        end
        P_NOSEL: begin
          if (!m.as) state <= P_IDLE;
        end
        P_ATT: begin
          if (!m.as) begin
            state <= P_IDLE;
          end else if (start) begin
            if (!ck_fire) begin
              // a falling DS edge outside a block transfer: handshake only
              dk_q <= head.rise;
            end else begin
              op_data  <= h_data;
              op_read  <= head.rd;
              op_block <= h_block;
              op_pe    <= perr;
              op_rdata <= rl_data;
              op_ss    <= SS_OK;
              if (perr) begin
                op_ss <= perr_ss;
              end else if (h_sec) begin
                if (h_write) begin
                  ia       <= head.ad;
                  ia_dirty <= 1'b1;
                  ia_ok    <= space_csr ? csr_ia_ok(head.ad) : data_ia_ok(head.ad);
                  if (!(space_csr ? csr_ia_ok(head.ad) : data_ia_ok(head.ad)))
                    op_ss <= SS_INVALID_IA;
                end
              end else if (!ia_ok) begin
                op_ss <= SS_INVALID_IA;
              end else if (space_csr && h_write && ia[2]) begin
                op_ss <= SS_INVALID_IA;
              end
              if (dreq.valid) ia_dirty <= 1'b0;
              state <= P_EXEC;
            end
          end
        end
        P_EXEC: begin
          if (!m.as) begin
            state <= P_IDLE;
          end else if (ck_done) begin
            dk_q    <= head.rise;
            pe_q    <= op_pe;
            drive_q <= op_read;
            rd_q    <= op_data ? rl_data : op_rdata;
            ss_q    <= (op_ss == SS_OK && op_data && op_block && ds_wrapped)
                       ? SS_END_OF_BLOCK : op_ss;
            state   <= P_ATT;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- bus outputs
  parity_gen u_par (.ad(rd_q), .enable(csr2.par_gen), .pa(s.pa));

  assign s.ak    = attached;
  assign s.dk    = attached && dk_q;
  assign s.wt    = hold || (attached && ds_wt);
  assign s.ss    = attached ? ss_q : SS_OK;
  assign s.ad_oe = attached && drive_q;
  assign s.pe    = attached && pe_q;

  // The queue never overflows under a legal master, and a port only asks
  // for memory while it owns the data space.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(attached && m.ds != ds_q && count == (PW+1)'(FIFO_DEPTH)));
  a_owner_only: assert property (@(posedge clk) disable iff (!rst_n)
    dreq.valid |-> ds_grant);

endmodule
