// input_port: decodes and issues the requests of one processor.
//
// Tokens arrive from the port's input FIFO through a three-entry prefetch
// buffer, so the head token is available for decoding every cycle although the
// FIFO has a two-cycle read latency. The port has two pipe stages.
//
// Stage 1 decodes the head token (or, while a multi-token request is open, the
// command held in the address register AR), checks the request's conditions
// and, when they hold, issues it and advances the queue:
//   memory read      room in the destination output FIFO
//   memory write     a data token: the next token of this port (address-data
//                    mode, the command first moves to AR) or the head of the
//                    data-only port named by data_in (address-only mode)
//   port config      writes register 0 or 1 from the command's low byte
//   addr-gen config  the command moves to AR; the next token of this port is
//                    written to the selected generator's register
//   burst            one cycle loads the generator's burst counter; then one
//                    access per cycle with addresses from the generator, each
//                    checked like a single read or write, until the counter
//                    reports the last access
//   mutex req/rel    passed to stage 2
//   anything else    dropped
// A five-state FSM (init, mem_wr, cfg_wr, burst, burst_wr) tracks the open
// request. In data-only mode the port executes only port configuration
// requests; every other token is a data token that its address-only partner
// takes through ext_pop. A disabled port (mode 00) drops everything but port
// configuration requests.
//
// Stage 2 holds the issued memory or mutex request until the shared resource
// accepts it: mem_req until mem_grant (same-cycle grant from the arbiter),
// mutex_req until the mutex's grant pulse, a mutex release for one cycle.
// Stage 1 only acts, including configuration writes, in a cycle in which
// stage 2 is empty or being accepted, which keeps the requests of one port in
// order: nothing after a mutex request runs before the lock is held.
//
// Departures from a literal reading: the read destination and write data are
// captured when a request enters stage 2; burst addresses and the burst
// counter advance when an access enters stage 2 rather than when it is
// granted (the order is the same); the burst command leaves the queue when
// its counter is loaded. Reset values: address-data mode, low priority, all
// port fields pointing at this port's own index.
//
// The two stages, the FSM states and the issue conditions follow the described
// port; the points listed above as departures are this design's own.
module input_port
  import smm_pkg::*;
#(
  parameter int unsigned PORT_ID = 0,
  parameter int unsigned NP      = NPORTS,
  parameter int unsigned NA      = NAGEN,
  parameter int unsigned NM      = NMUTEX
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  srst,
  // input FIFO read side
  output logic                  fifo_rd_en,
  input  token_t                fifo_rd_data,
  input  logic                  fifo_rd_valid,
  // data-only service to an address-only partner
  output logic [DW-1:0]         head_data,
  output logic                  head_is_data,
  input  logic                  ext_pop,
  // data tokens offered by all ports, and the pops this port makes on them
  input  logic [NP-1:0][DW-1:0] partner_data,
  input  logic [NP-1:0]         partner_valid,
  output logic [NP-1:0]         partner_pop,
  // output FIFO space
  input  logic [NP-1:0]         out_full,
  // address generators
  input  logic [NA-1:0][DW-1:0] agen_addr,
  input  logic [NA-1:0]         agen_last,
  output logic [NA-1:0]         agen_sel,
  output logic                  agen_step,
  output logic                  agen_load,
  output logic [7:0]            agen_len,
  output logic                  agen_cfg_we,
  output logic [7:0]            agen_cfg_addr,
  output logic [DW-1:0]         agen_cfg_data,
  // memory
  output logic                  mem_req,
  input  logic                  mem_grant,
  output request_t              s2,
  // mutexes
  output logic [NM-1:0]         mutex_req,
  output logic [NM-1:0]         mutex_rel,
  input  logic [NM-1:0]         mutex_grant,
  // status
  output logic                  prio,
  output logic                  idle,
  output port_state_e           state
);

  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;

  // ------------------------------------------------------------ prefetch
  token_t tok;
  logic   hv, pop_own, pf_empty;

  prefetch_buf #(.W($bits(token_t)), .DEPTH(3), .LAT(2)) u_pf (
    .clk(clk), .rst_n(rst_n), .srst(srst),
    .src_req(fifo_rd_en), .src_data(fifo_rd_data), .src_valid(fifo_rd_valid),
    .data_out(tok), .valid(hv), .ack(pop_own || ext_pop), .none_held(pf_empty));

  // ------------------------------------------------------------ registers
  port_cfg0_t  cfg0;
  port_cfg1_t  cfg1;
  token_t      ar;
  port_state_e ps, ns;

  // ------------------------------------------------------------ decode
  logic [3:0] op;
  logic       is_pcfg, is_agen_cfg, is_burst, is_mreq, is_mrel;
  logic       addr_mode;
  logic [PW-1:0] rd_dest, pidx;
  logic       dest_full, pvalid;
  logic [DW-1:0] pdata, burst_addr;
  logic [NA-1:0] burst_sel;
  logic       burst_last;

  assign op          = tok.data[15:12];
  assign is_pcfg     =  tok.cfgen && !tok.wren && op == OP_PORT_CFG;
  assign is_agen_cfg =  tok.cfgen &&  tok.wren && op == OP_AGEN_CFG;
  assign is_burst    =  tok.cfgen && op == OP_BURST;
  assign is_mreq     =  tok.cfgen && !tok.wren && op == OP_MUTEX && tok.data[7:4] == MUTEX_REQ;
  assign is_mrel     =  tok.cfgen && !tok.wren && op == OP_MUTEX && tok.data[7:4] == MUTEX_REL;
  assign addr_mode   =  cfg0.mode[1];

  assign rd_dest   = (cfg0.mode == MODE_ADDR_DATA) ? cfg0.out_port[PW-1:0] : cfg1.data_out[PW-1:0];
  assign dest_full = out_full[rd_dest];
  assign pidx      = cfg1.data_in[PW-1:0];
  assign pdata     = partner_data[pidx];
  assign pvalid    = partner_valid[pidx];

  assign head_data    = tok.data;
  assign head_is_data = hv && cfg0.mode == MODE_DATA_ONLY && !is_pcfg;

  always_comb begin
    burst_sel  = (ps == PS_INIT) ? tok.data[11:8] : ar.data[11:8];
    burst_addr = '0;
    burst_last = 1'b0;
    for (int g = 0; g < int'(NA); g++) begin
      if (burst_sel[g]) begin
        burst_addr |= agen_addr[g];
        burst_last |= agen_last[g];
      end
    end
  end

  // ------------------------------------------------------------ stage 2 accept
  logic accepted, s2_free;
  always_comb begin
    accepted = 1'b0;
    if (s2.valid) begin
      unique case (s2.kind)
        RQ_MEM_RD, RQ_MEM_WR: accepted = mem_grant;
        RQ_MUTEX_REQ:         accepted = |(mutex_grant & s2.mutex);
        RQ_MUTEX_REL:         accepted = 1'b1;
      endcase
    end
  end
  assign s2_free   = !s2.valid || accepted;
  assign mem_req   = s2.valid && (s2.kind == RQ_MEM_RD || s2.kind == RQ_MEM_WR);
  assign mutex_req = (s2.valid && s2.kind == RQ_MUTEX_REQ) ? s2.mutex : '0;
  assign mutex_rel = (s2.valid && s2.kind == RQ_MUTEX_REL) ? s2.mutex : '0;

  // ------------------------------------------------------------ stage 1
  request_t issue;
  logic     cfg0_we, cfg1_we, ar_load;

  always_comb begin
    ns            = ps;
    issue         = '0;
    pop_own       = 1'b0;
    partner_pop   = '0;
    cfg0_we       = 1'b0;
    cfg1_we       = 1'b0;
    ar_load       = 1'b0;
    agen_sel      = burst_sel;
    agen_step     = 1'b0;
    agen_load     = 1'b0;
    agen_len      = tok.data[7:0];
    agen_cfg_we   = 1'b0;
    agen_cfg_addr = ar.data[7:0];
    agen_cfg_data = tok.data;

    if (s2_free) begin
      unique case (ps)
        PS_INIT: if (hv) begin
          if (is_pcfg) begin
            cfg0_we = (tok.data[11:8] == 4'd0);
            cfg1_we = (tok.data[11:8] == 4'd1);
            pop_own = 1'b1;
          end else if (cfg0.mode == MODE_DISABLED) begin
            pop_own = 1'b1;
          end else if (addr_mode) begin
            if (!tok.cfgen && !tok.wren) begin
              if (!dest_full) begin
                issue   = '{valid: 1'b1, kind: RQ_MEM_RD, addr: tok.data, wdata: '0,
                            dest: 2'(rd_dest), mutex: '0};
                pop_own = 1'b1;
              end
            end else if (!tok.cfgen && tok.wren) begin
              if (cfg0.mode == MODE_ADDR_DATA) begin
                ar_load = 1'b1;
                pop_own = 1'b1;
                ns      = PS_MEM_WR;
              end else if (pvalid) begin
                issue   = '{valid: 1'b1, kind: RQ_MEM_WR, addr: tok.data, wdata: pdata,
                            dest: '0, mutex: '0};
                pop_own = 1'b1;
                partner_pop[pidx] = 1'b1;
              end
            end else if (is_agen_cfg) begin
              ar_load = 1'b1;
              pop_own = 1'b1;
              ns      = PS_CFG_WR;
            end else if (is_burst) begin
              ar_load   = 1'b1;
              pop_own   = 1'b1;
              agen_load = 1'b1;
              if (tok.data[7:0] != 8'd0) ns = tok.wren ? PS_BURST_WR : PS_BURST;
            end else if (is_mreq || is_mrel) begin
              issue   = '{valid: 1'b1, kind: is_mreq ? RQ_MUTEX_REQ : RQ_MUTEX_REL,
                          addr: '0, wdata: '0, dest: '0, mutex: tok.data[3:0]};
              pop_own = 1'b1;
            end else begin
              pop_own = 1'b1;   // unrecognised configuration-space token
            end
          end
          // data-only mode: data tokens wait for the partner's ext_pop
        end

        PS_MEM_WR: if (hv) begin
          issue   = '{valid: 1'b1, kind: RQ_MEM_WR, addr: ar.data, wdata: tok.data,
                      dest: '0, mutex: '0};
          pop_own = 1'b1;
          ns      = PS_INIT;
        end

        PS_CFG_WR: if (hv) begin
          agen_sel    = ar.data[11:8];
          agen_cfg_we = 1'b1;
          pop_own     = 1'b1;
          ns          = PS_INIT;
        end

        PS_BURST: if (!dest_full) begin
          issue     = '{valid: 1'b1, kind: RQ_MEM_RD, addr: burst_addr, wdata: '0,
                        dest: 2'(rd_dest), mutex: '0};
          agen_step = 1'b1;
          if (burst_last) ns = PS_INIT;
        end

        PS_BURST_WR: begin
          if (cfg0.mode == MODE_ADDR_ONLY) begin
            if (pvalid) begin
              issue     = '{valid: 1'b1, kind: RQ_MEM_WR, addr: burst_addr, wdata: pdata,
                            dest: '0, mutex: '0};
              partner_pop[pidx] = 1'b1;
              agen_step = 1'b1;
              if (burst_last) ns = PS_INIT;
            end
          end else if (hv) begin
            issue     = '{valid: 1'b1, kind: RQ_MEM_WR, addr: burst_addr, wdata: tok.data,
                          dest: '0, mutex: '0};
            pop_own   = 1'b1;
            agen_step = 1'b1;
            if (burst_last) ns = PS_INIT;
          end
        end

        default: ns = PS_INIT;
      endcase
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps   <= PS_INIT;
      s2   <= '0;
      ar   <= '0;
      cfg0 <= '{prio: 1'b0, unused: '0, out_port: 3'(PORT_ID), mode: MODE_ADDR_DATA};
      cfg1 <= '{unused: '0, data_out: 3'(PORT_ID), data_in: 3'(PORT_ID)};
    end else if (srst) begin
      ps   <= PS_INIT;
      s2   <= '0;
      ar   <= '0;
      cfg0 <= '{prio: 1'b0, unused: '0, out_port: 3'(PORT_ID), mode: MODE_ADDR_DATA};
      cfg1 <= '{unused: '0, data_out: 3'(PORT_ID), data_in: 3'(PORT_ID)};
    end else begin
      ps <= ns;
      if (s2_free) s2 <= issue;
      if (ar_load) ar <= tok;
      if (cfg0_we) cfg0 <= port_cfg0_t'(tok.data[7:0]);
      if (cfg1_we) cfg1 <= port_cfg1_t'(tok.data[7:0]);
    end
  end

  assign prio  = cfg0.prio;
  assign idle  = pf_empty && ps == PS_INIT && !s2.valid;
  assign state = ps;

  // A data-only port's token may be taken by its partner only when it is data.
  a_ext_pop_data: assert property (@(posedge clk) disable iff (!rst_n)
    ext_pop |-> head_is_data);
  a_no_self_and_ext_pop: assert property (@(posedge clk) disable iff (!rst_n)
    !(ext_pop && pop_own));

endmodule
