// rbc_top: the Rollback Chip with its controller.
//
// The chip makes a RAM behave as a stack of snapshots ("mark frames") of a
// process's memory for Time Warp simulation. The host issues reset, read,
// write, mark (start a new snapshot), rollback (discard the newest
// snapshots) and advance (discard the oldest snapshot). Nothing is copied
// on a mark: a write goes into the current frame CMF and sets that frame's
// written bit for the address; a read returns the most recent version, found
// by a circular priority encode of the address's written bits from CMF down
// to the oldest frame OMF, or the archive frame when no bit is set. Rollback
// does not clear written bits either: it records the discarded frames in the
// rollback history stack (RBH), and every written-bits word is ANDed with the
// RBH entry named by its timestamp tag before use. A mark is treated as a
// one-frame rollback of the new frame followed by a step up, so stale bits of
// a reused frame are masked the same way. Advance copies, for each address
// whose newest surviving bit is at OMF, the OMF word into the archive frame,
// then steps OMF.
//
// Interface: a request is accepted on a clock edge where req_valid and
// req_ready are both high (req_ready is high when the controller is idle).
// done pulses for one cycle when the operation has finished; err is valid
// with it and rdata (DLATCH) holds the read data after a read.
// rbdest is the rollback mask: ones for frames that remain, zeros for the
// frames discarded (a contiguous circular run from CMF downwards).
//
// Timing in clock cycles from acceptance to done: read 1, mark 1, rollback 1,
// write 2, reset 2, advance WORDS + K + 3 where K is the number of addresses
// archived. Refused operations (see rbc_err_e) take 1 cycle and change
// nothing. The datapath (WB+TS, RBH, CRBI, WBAND, ADVAND, ADVMUX, BITOR,
// ENCMUX, CPENCODE, DECODE, CMF, OMF, EAMUX, CONC, RAM, WBLATCH, DLATCH) and
// the cycle split of write follow the design; the request handshake, error
// reporting, the bounded history and the clock-by-clock order of reset and
// advance are this design's choices. rst (synchronous, active high) only
// resets the controller; the chip's state is initialised by a reset request.
module rbc_top
  import rbc_pkg::*;
#(
  parameter int unsigned NFRAMES   = 32,
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned RBH_DEPTH = 1024,
  parameter int unsigned FRAME_W   = $clog2(NFRAMES + 1),
  parameter int unsigned ADDR_W    = $clog2(WORDS),
  parameter int unsigned TS_W      = $clog2(RBH_DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // host request
  input  logic               req_valid,
  output logic               req_ready,
  input  rbc_op_e            req_op,
  input  logic [ADDR_W-1:0]  req_addr,
  input  logic [DATA_W-1:0]  req_wdata,
  input  logic [NFRAMES-1:0] req_rbdest,
  // completion
  output logic               done,
  output rbc_err_e           err,
  output logic [DATA_W-1:0]  rdata,
  // status
  output logic [FRAME_W-1:0] cmf,
  output logic [FRAME_W-1:0] omf,
  output logic [TS_W-1:0]    crbi,
  output logic               need_reset
);
  localparam logic [FRAME_W-1:0] AFRAMEADDR = FRAME_W'(NFRAMES);

  typedef enum logic [2:0] {
    S_IDLE, S_RST2, S_WR2, S_ADV_INIT, S_ADV_SCAN, S_ADV_COPY, S_ADV_FIN
  } state_e;

  typedef enum logic [1:0] { EA_MRV, EA_CMF, EA_AFRAME } ea_sel_e;

  state_e state;
  logic [ADDR_W-1:0] addr_q;
  logic              dead;       // rollback underflow seen; reset needed

  // datapath control
  wbts_ev_e  wbts_ev;
  rbh_ev_e   rbh_ev;
  fp_ev_e    cmf_ev, omf_ev;
  crbi_ev_e  crbi_ev;
  ram_ev_e   ram_ev;
  logic      sel_rbhasel;        // 1: CRBI, 0: timestamp tag
  logic      sel_advmux;         // 1: advance-masked RBH word
  logic      sel_encmux;         // 1: rbdest, 0: masked written bits
  ea_sel_e   sel_eamux;
  logic      wblatch_load, dlatch_load;
  logic      use_mark_mask;      // RBH update mask is the mark mask
  logic      amask_load;
  logic      sel_rdwac;          // WB+TS read at the advance counter

  // datapath nets
  logic [ADDR_W-1:0]  wordaddr;
  logic [NFRAMES-1:0] wb, rbh_q, advand, advmux, wband, bitor, encmux;
  logic [NFRAMES-1:0] decc, deco, cp_onehot, wblatch_q, amaskreg, rbh_mask;
  logic [NFRAMES-1:0] dec_next;
  logic [TS_W-1:0]    ts, rbh_idx;
  logic [ADDR_W-1:0]  wac;
  logic               waciszero, cp_allzero, crbi_full;
  logic [FRAME_W-1:0] mrv, ea, cmf_din, cmf_next;
  logic [DATA_W-1:0]  ram_rdata;
  logic [FRAME_W+ADDR_W-1:0] ram_addr;

  // ---------------------------------------------------------------- blocks
  rbc_wbts #(.NFRAMES(NFRAMES), .WORDS(WORDS), .RBH_DEPTH(RBH_DEPTH)) u_wbts (
    .clk, .ev(wbts_ev), .rdwac(sel_rdwac), .wordaddr, .wb_in(wblatch_q), .ts_in(crbi),
    .wb, .ts, .wac, .waciszero);

  rbc_crbi #(.RBH_DEPTH(RBH_DEPTH)) u_crbi (
    .clk, .ev(crbi_ev), .crbi, .full(crbi_full));

  rbc_rbh #(.NFRAMES(NFRAMES), .RBH_DEPTH(RBH_DEPTH)) u_rbh (
    .clk, .ev(rbh_ev), .idx(rbh_idx), .top(crbi), .mask(rbh_mask), .q(rbh_q));

  rbc_decode #(.NFRAMES(NFRAMES)) u_dec_cmf (.frame(cmf), .onehot(decc));
  rbc_decode #(.NFRAMES(NFRAMES)) u_dec_omf (.frame(omf), .onehot(deco));
  rbc_decode #(.NFRAMES(NFRAMES)) u_dec_nxt (.frame(cmf_next), .onehot(dec_next));

  rbc_cpencode #(.NFRAMES(NFRAMES)) u_cpe (
    .din(encmux), .decc, .deco, .cpout(cp_onehot), .num(mrv), .allzero(cp_allzero));

  rbc_frame_ptr #(.NFRAMES(NFRAMES)) u_cmf (.clk, .ev(cmf_ev), .din(cmf_din), .q(cmf));
  rbc_frame_ptr #(.NFRAMES(NFRAMES)) u_omf (.clk, .ev(omf_ev), .din('0), .q(omf));

  rbc_latch #(.WIDTH(NFRAMES)) u_wblatch (
    .clk, .rst, .load(wblatch_load), .d(bitor), .q(wblatch_q));
  rbc_latch #(.WIDTH(DATA_W)) u_dlatch (
    .clk, .rst, .load(dlatch_load), .d(ram_rdata), .q(rdata));

  rbc_ram #(.NFRAMES(NFRAMES), .WORDS(WORDS), .DATA_W(DATA_W)) u_ram (
    .clk, .ev(ram_ev), .addr(ram_addr),
    .wdata((state == S_ADV_COPY) ? rdata : req_wdata), .rdata(ram_rdata));

  // ------------------------------------------------------- gates and muxes
  assign wordaddr = (state == S_IDLE) ? req_addr : addr_q;
  assign rbh_idx  = sel_rbhasel ? crbi : ts;               // RBHASEL
  assign advand   = rbh_q & amaskreg;                      // ADVAND
  assign advmux   = sel_advmux ? advand : rbh_q;           // ADVMUX
  assign wband    = wb & advmux;                           // WBAND
  assign bitor    = wband | decc;                          // BITOR
  assign encmux   = sel_encmux ? req_rbdest : wband;       // ENCMUX
  assign cmf_next = (int'(cmf) >= int'(NFRAMES) - 1) ? '0 : cmf + 1'b1;
  assign rbh_mask = use_mark_mask ? ~dec_next : req_rbdest;
  assign cmf_din  = cp_allzero ? AFRAMEADDR : mrv;

  always_comb begin                                        // EAMUX
    unique case (sel_eamux)
      EA_MRV:  ea = cp_allzero ? AFRAMEADDR : mrv;
      EA_CMF:  ea = cmf;
      default: ea = AFRAMEADDR;
    endcase
  end
  // CONC: the frame number forms the upper bits of the RAM address.
  assign sel_rdwac = (state inside {S_ADV_SCAN, S_ADV_COPY});
  assign ram_addr  = {ea, sel_rdwac ? wac : wordaddr};

  // AMASKREG: the decoded OMF, loaded at the start of an advance.
  always_ff @(posedge clk) begin
    if (rst)             amaskreg <= '0;
    else if (amask_load) amaskreg <= deco;
  end

  // ------------------------------------------------------------ controller
  logic     accept;
  rbc_err_e refuse;
  logic     fin;                 // operation finishes in this cycle
  rbc_err_e fin_err;
  state_e   state_d;

  assign req_ready = (state == S_IDLE);
  assign accept    = req_valid && req_ready;

  // Reasons to refuse an accepted request.
  always_comb begin
    refuse = ERR_NONE;
    if (req_op != OP_RESET && req_op != OP_NOP && dead)
      refuse = ERR_NEED_RST;
    else if (req_op == OP_MARK && cmf_next == omf)
      refuse = ERR_MARK_OVF;
    else if ((req_op == OP_MARK || req_op == OP_ROLLBACK) && crbi_full)
      refuse = ERR_RBH_FULL;
    else if (req_op == OP_ADVANCE && cmf == omf)
      refuse = ERR_ADV_OVF;
  end

  always_comb begin
    wbts_ev = WBTS_NOP;  rbh_ev = RBH_NOP;  cmf_ev = FP_NOP;  omf_ev = FP_NOP;
    crbi_ev = CRBI_NOP;  ram_ev = RAM_NOP;
    sel_rbhasel = 1'b0;  sel_advmux = 1'b0;  sel_encmux = 1'b0;  sel_eamux = EA_MRV;
    wblatch_load = 1'b0; dlatch_load = 1'b0; use_mark_mask = 1'b0; amask_load = 1'b0;
    fin = 1'b0; fin_err = ERR_NONE; state_d = state;
    unique case (state)
      S_IDLE: if (accept) begin
        fin     = 1'b1;
        fin_err = refuse;
        if (refuse == ERR_NONE) begin
          unique case (req_op)
            OP_RESET: begin
              wbts_ev = WBTS_RESET; cmf_ev = FP_CLEAR; omf_ev = FP_CLEAR;
              crbi_ev = CRBI_CLR;
              fin = 1'b0; state_d = S_RST2;
            end
            OP_READ: begin
              wbts_ev = WBTS_READ; ram_ev = RAM_READ; dlatch_load = 1'b1;
            end
            OP_WRITE: begin
              wbts_ev = WBTS_READ; wblatch_load = 1'b1;
              sel_eamux = EA_CMF; ram_ev = RAM_WRITE;
              fin = 1'b0; state_d = S_WR2;
            end
            OP_MARK: begin
              cmf_ev = FP_UP; use_mark_mask = 1'b1; rbh_ev = RBH_UPDATE;
              crbi_ev = CRBI_UP;
            end
            OP_ROLLBACK: begin
              sel_encmux = 1'b1; cmf_ev = FP_LOAD; rbh_ev = RBH_UPDATE;
              crbi_ev = CRBI_UP;
              if (cp_allzero) fin_err = ERR_RB_UNDER;
            end
            OP_ADVANCE: begin
              fin = 1'b0; state_d = S_ADV_INIT;
            end
            default: ;
          endcase
        end
      end
      S_RST2: begin
        sel_rbhasel = 1'b1; rbh_ev = RBH_SETALL;
        fin = 1'b1; state_d = S_IDLE;
      end
      S_WR2: begin
        wbts_ev = WBTS_WRITE;
        fin = 1'b1; state_d = S_IDLE;
      end
      S_ADV_INIT: begin
        wbts_ev = WBTS_CLRWAC; amask_load = 1'b1;
        state_d = S_ADV_SCAN;
      end
      S_ADV_SCAN: begin
        sel_advmux = 1'b1;
        if (!cp_allzero) begin
          ram_ev = RAM_READ; dlatch_load = 1'b1;    // EA = mrv = OMF
          state_d = S_ADV_COPY;
        end else begin
          wbts_ev = WBTS_UPWAC;
          if (int'(wac) == int'(WORDS) - 1) state_d = S_ADV_FIN;
        end
      end
      S_ADV_COPY: begin
        sel_eamux = EA_AFRAME; ram_ev = RAM_WRITE; wbts_ev = WBTS_UPWAC;
        state_d = (int'(wac) == int'(WORDS) - 1) ? S_ADV_FIN : S_ADV_SCAN;
      end
      S_ADV_FIN: begin
        omf_ev = FP_UP;
        fin = 1'b1; state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      err   <= ERR_NONE;
      dead  <= 1'b1;
    end else begin
      state <= state_d;
      done  <= fin;
      if (fin) err <= fin_err;
      if (accept) addr_q <= req_addr;
      if (accept && req_op == OP_RESET) dead <= 1'b0;
      else if (fin && fin_err == ERR_RB_UNDER) dead <= 1'b1;
    end
  end

  assign need_reset = dead;

  // ------------------------------------------------------------ assertions
  // The advance counter starts each scan at address 0.
  a_wac_start: assert property (@(posedge clk) disable iff (rst)
    (state == S_ADV_INIT) |=> waciszero);
  // The new written-bits word of a write always has the CMF bit set.
  a_wb_cmf: assert property (@(posedge clk) disable iff (rst)
    (state == S_WR2) |-> ((wblatch_q & decc) != '0));
  // The encoder result is one-hot or empty.
  a_cpe_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0(cp_onehot));
  // A request waiting for a busy controller keeps its operation.
  a_req_stable: assert property (@(posedge clk) disable iff (rst)
    (req_valid && !req_ready) |=> (!req_valid || $stable(req_op)) || req_ready);

endmodule
