// dsb_router: a five-port distributed shared-buffer (DSB) network-on-chip
// router. Instead of buffering at the outputs, flits cross a first crossbar
// (XB1, 5 x NUM_MM) into one of NUM_MM middle-memory banks and a second
// crossbar (XB2, NUM_MM x 5) out of them. Each flit is given the departure
// time it would have in an output-buffered router (first come, first served
// per output), is stored in a bank that is free of conflicts for that time,
// and is read out exactly at that time. Nothing is dropped: a flit is only
// timestamped when the next router has room for it (credits).
//
// Pipeline, one stage per cycle:
//   1 RC     route computation of a head flit at the front of an input VC
//   2 TS     random VC pick per input, departure time from the output's FCFS
//            reservation (timestamper)
//   3 CR/VA  conflict-free bank (conflict_resolver + mm_reservation_table) and,
//            for a head flit, a downstream VC (vc_allocator), in parallel.
//            If either fails the flit goes back to TS.
//   4 XB1/MM_WR  the flit crosses XB1 and is written into its bank
//   5 MM_RD/XB2  in the cycle equal to its timestamp it is read and crosses XB2
//   6 LT     output register driving the link
// With no contention a head flit presented on in_valid in cycle T appears on
// out_valid in cycle T+6; the flits behind it follow one per cycle.
//
// Ports are ordered north, south, east, west, local (port 4 is the
// injection/ejection port). in_flit.vc names the VC of this router's input;
// out_flit.vc names the VC at the next router, chosen here. credit_out[i]
// returns one credit to the upstream router per flit leaving input i's
// buffers; credit_in[o] brings credits back from the router behind output o.
//
// The stages, two crossbars, reservation tables, free/reserved VC lists and
// credits follow the published design; the cycle-level details (look-ahead
// on a VC while its previous flit is in CR, squashing on failure, slot
// handling, widths) are this design's, and are described in each block.
module dsb_router
  import dsb_pkg::*;
#(
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int VC_DEPTH = DEF_VC_DEPTH,
  parameter int NUM_MM   = DEF_NUM_MM,
  parameter int MM_DEPTH = DEF_MM_DEPTH,
  parameter int TS_W     = DEF_TS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   cur_x,
  input  logic [COORD_W-1:0]   cur_y,
  input  logic [NUM_PORTS-1:0] in_valid,
  input  flit_t                in_flit    [NUM_PORTS],
  output credit_t              credit_out [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  output flit_t                out_flit   [NUM_PORTS],
  input  credit_t              credit_in  [NUM_PORTS]
);
  localparam int BW = (NUM_MM   > 1) ? $clog2(NUM_MM)   : 1;
  localparam int AW = (MM_DEPTH > 1) ? $clog2(MM_DEPTH) : 1;
  localparam int CW = $clog2(VC_DEPTH+1);
  localparam int FW = $clog2(NUM_VC+1);
  localparam int VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // router clock, used as the time base of the timestamps
  logic [TS_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  // ---------------------------------------------------------------- inputs
  logic [CW-1:0]      vc_count    [NUM_PORTS][NUM_VC];
  flit_t              vc_head     [NUM_PORTS][NUM_VC];
  flit_t              vc_next     [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]  vc_routed   [NUM_PORTS];
  port_e              vc_out_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]  vc_has_ovc  [NUM_PORTS];
  logic [VC_ID_W-1:0] vc_ovc      [NUM_PORTS][NUM_VC];

  logic [NUM_PORTS-1:0] commit;
  logic [VC_ID_W-1:0]   alloc_vc [NUM_PORTS];

  // TS -> CR/VA pipeline register
  logic [NUM_PORTS-1:0] cr_v;
  logic [VC_ID_W-1:0]   cr_vc   [NUM_PORTS];
  port_e                cr_port [NUM_PORTS];
  logic [TS_W-1:0]      cr_ts   [NUM_PORTS];
  flit_t                cr_flit [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    input_port #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_port (
      .clk, .rst_n, .cur_x, .cur_y,
      .in_valid(in_valid[i]), .in_flit(in_flit[i]),
      .credit_out(credit_out[i]),
      .vc_count(vc_count[i]), .vc_head(vc_head[i]), .vc_next(vc_next[i]),
      .vc_routed(vc_routed[i]), .vc_out_port(vc_out_port[i]),
      .vc_has_ovc(vc_has_ovc[i]), .vc_ovc(vc_ovc[i]),
      .commit_valid(commit[i]), .commit_vc(cr_vc[i]),
      .commit_head(cr_flit[i].head), .commit_tail(cr_flit[i].tail),
      .commit_ovc(alloc_vc[i])
    );
  end

  // ------------------------------------------------- TS stage: eligibility
  logic [FW-1:0]      free_count [NUM_PORTS];
  logic [CW-1:0]      credits    [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]  reserved   [NUM_PORTS];
  logic [NUM_VC-1:0]  eligible   [NUM_PORTS];
  flit_t              cand_flit  [NUM_PORTS][NUM_VC];

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        logic  inflight, avail, cred_ok;
        port_e o;
        inflight        = cr_v[i] && cr_vc[i] == VC_ID_W'(v);
        o               = vc_out_port[i][v];
        cand_flit[i][v] = inflight ? vc_next[i][v] : vc_head[i][v];
        avail = inflight ? (vc_count[i][v] >= CW'(2) && !cr_flit[i].tail)
                         : (vc_count[i][v] != '0);
        if (vc_has_ovc[i][v])
          cred_ok = credits[o][VW'(vc_ovc[i][v])] > (inflight ? CW'(1) : CW'(0));
        else if (inflight)
          cred_ok = 1'b1;            // head ahead in CR gets an empty VC
        else
          cred_ok = free_count[o] != '0;  // a head: some VC must be free
        eligible[i][v] = vc_routed[i][v] && avail && cred_ok;
      end
    end
  end

  logic [NUM_PORTS-1:0] ts_grant;
  logic [VC_ID_W-1:0]   ts_vc   [NUM_PORTS];
  port_e                ts_port [NUM_PORTS];
  logic [TS_W-1:0]      ts_ts   [NUM_PORTS];

  timestamper #(.NUM_VC(NUM_VC), .TS_W(TS_W)) u_ts (
    .clk, .rst_n, .now,
    .eligible, .req_port(vc_out_port),
    .grant(ts_grant), .grant_vc(ts_vc), .grant_port(ts_port), .grant_ts(ts_ts)
  );

  // A flit picked behind one of its VC that fails CR this cycle is dropped
  // from the pipe (it would overtake); it is picked again later.
  logic [NUM_PORTS-1:0] squash;
  always_comb
    for (int i = 0; i < NUM_PORTS; i++)
      squash[i] = cr_v[i] && !commit[i] && ts_vc[i] == cr_vc[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cr_v <= '0;
    else        cr_v <= ts_grant & ~squash;
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      cr_vc[i]   <= ts_vc[i];
      cr_port[i] <= ts_port[i];
      cr_ts[i]   <= ts_ts[i];
      cr_flit[i] <= cand_flit[i][VW'(ts_vc[i])];
    end
  end

  // --------------------------------------------------- CR / VA stage
  logic [NUM_MM-1:0]    conflict  [NUM_PORTS];
  logic [NUM_MM-1:0]    mm_full;
  logic [AW-1:0]        free_addr [NUM_MM];
  logic [NUM_PORTS-1:0] va_req, va_ok, cr_req;
  logic [BW-1:0]        cr_bank   [NUM_PORTS];
  logic [AW-1:0]        cr_addr   [NUM_PORTS];
  logic [NUM_PORTS-1:0] cr_head, cr_tail;
  logic [VC_ID_W-1:0]   body_vc   [NUM_PORTS];
  logic [NUM_MM-1:0]    rd_valid;
  logic [AW-1:0]        rd_addr   [NUM_MM];
  port_e                rd_port   [NUM_MM];
  logic [$clog2(NUM_MM*MM_DEPTH+1)-1:0] mm_occupancy;

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      cr_head[i] = cr_flit[i].head;
      cr_tail[i] = cr_flit[i].tail;
      va_req[i]  = cr_v[i] && cr_head[i];
      cr_req[i]  = cr_v[i] && (!cr_head[i] || va_ok[i]);
      body_vc[i] = vc_ovc[i][VW'(cr_vc[i])];
    end
  end

  vc_allocator #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_va (
    .clk, .rst_n,
    .free_count, .credits,
    .va_req, .va_port(cr_port), .va_ok,
    .c_valid(commit), .c_port(cr_port), .c_head(cr_head), .c_tail(cr_tail),
    .c_vc(body_vc), .alloc_vc,
    .credit_in, .reserved
  );

  conflict_resolver #(.NUM_MM(NUM_MM)) u_cr (
    .req(cr_req), .conflict, .full(mm_full),
    .ok(commit), .bank(cr_bank)
  );

  always_comb
    for (int i = 0; i < NUM_PORTS; i++) cr_addr[i] = free_addr[cr_bank[i]];

  mm_reservation_table #(.NUM_MM(NUM_MM), .MM_DEPTH(MM_DEPTH), .TS_W(TS_W)) u_rt (
    .clk, .rst_n, .now,
    .q_ts(cr_ts), .conflict, .full(mm_full), .free_addr,
    .c_valid(commit), .c_bank(cr_bank), .c_addr(cr_addr), .c_ts(cr_ts), .c_port(cr_port),
    .rd_valid, .rd_addr, .rd_port, .occupancy(mm_occupancy)
  );

  // ------------------------------------------------ XB1 / MM_WR stage
  logic [NUM_PORTS-1:0] wb_v;
  logic [BW-1:0]        wb_bank [NUM_PORTS];
  logic [AW-1:0]        wb_addr [NUM_PORTS];
  flit_t                wb_flit [NUM_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wb_v <= '0;
    else        wb_v <= commit;
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      wb_bank[i]    <= cr_bank[i];
      wb_addr[i]    <= cr_addr[i];
      wb_flit[i]    <= cr_flit[i];
      wb_flit[i].vc <= alloc_vc[i];   // VC at the next router
    end
  end

  localparam int ISW = $clog2(NUM_PORTS);
  logic [NUM_MM-1:0] xb1_en, xb1_valid;
  logic [ISW-1:0]    xb1_sel  [NUM_MM];
  flit_t             xb1_flit [NUM_MM];
  logic [AW-1:0]     mm_waddr [NUM_MM];

  always_comb begin
    for (int m = 0; m < NUM_MM; m++) begin
      xb1_en[m]   = 1'b0;
      xb1_sel[m]  = '0;
      mm_waddr[m] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (wb_v[i] && wb_bank[i] == BW'(m)) begin
          xb1_en[m]   = 1'b1;
          xb1_sel[m]  = ISW'(i);
          mm_waddr[m] = wb_addr[i];
        end
    end
  end

  crossbar #(.N_IN(NUM_PORTS), .N_OUT(NUM_MM)) u_xb1 (
    .in_flit(wb_flit), .out_en(xb1_en), .out_sel(xb1_sel),
    .out_valid(xb1_valid), .out_flit(xb1_flit)
  );

  // ------------------------------------------------ MM_RD / XB2 stage
  flit_t mm_rd_flit [NUM_MM];

  for (genvar m = 0; m < NUM_MM; m++) begin : g_mm
    middle_memory #(.DEPTH(MM_DEPTH)) u_mm (
      .clk,
      .wr_en(xb1_valid[m]), .wr_addr(mm_waddr[m]), .wr_flit(xb1_flit[m]),
      .rd_addr(rd_addr[m]), .rd_flit(mm_rd_flit[m])
    );
  end

  localparam int MSW = (NUM_MM > 1) ? $clog2(NUM_MM) : 1;
  logic [NUM_PORTS-1:0] xb2_en, xb2_valid;
  logic [MSW-1:0]       xb2_sel  [NUM_PORTS];
  flit_t                xb2_flit [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      xb2_en[o]  = 1'b0;
      xb2_sel[o] = '0;
      for (int m = 0; m < NUM_MM; m++)
        if (rd_valid[m] && rd_port[m] == port_e'(o)) begin
          xb2_en[o]  = 1'b1;
          xb2_sel[o] = MSW'(m);
        end
    end
  end

  crossbar #(.N_IN(NUM_MM), .N_OUT(NUM_PORTS)) u_xb2 (
    .in_flit(mm_rd_flit), .out_en(xb2_en), .out_sel(xb2_sel),
    .out_valid(xb2_valid), .out_flit(xb2_flit)
  );

  // ------------------------------------------------ LT stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int o = 0; o < NUM_PORTS; o++) out_flit[o] <= '0;
    end else begin
      out_valid <= xb2_valid;
      out_flit  <= xb2_flit;
    end
  end

  // one departure per output and per bank in a cycle
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_one_per_output: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(rd_valid_for(o)));
  end
  function automatic logic [NUM_MM-1:0] rd_valid_for(int o);
    logic [NUM_MM-1:0] r;
    for (int m = 0; m < NUM_MM; m++) r[m] = rd_valid[m] && rd_port[m] == port_e'(o);
    return r;
  endfunction
endmodule
