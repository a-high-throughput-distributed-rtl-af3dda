// dsb_mesh: a K x K mesh of dsb_router instances, each with a mesh_endpoint
// on its local port, for workload tests. Router (x, y) sends north to
// (x, y+1) and east to (x+1, y); every link carries flits one way and
// credits back the other. Edge ports are left unconnected (X-Y routing never
// uses them). The endpoints' statistics are summed over all nodes.
module dsb_mesh
  import dsb_pkg::*;
#(
  parameter int K        = 4,
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int VC_DEPTH = DEF_VC_DEPTH,
  parameter int NUM_MM   = DEF_NUM_MM,
  parameter int MM_DEPTH = DEF_MM_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  input  int     pattern,
  input  int     rate_ppm,
  input  logic   inject,
  input  logic   measure,
  input  int     now,
  output int     tot_created,
  output int     tot_ejected,
  output int     tot_wflits,
  output int     tot_wpkts,
  output longint tot_wlat,
  output int     tot_errors,
  output logic   all_idle
);
  logic [NUM_PORTS-1:0] r_in_valid  [K][K], r_out_valid [K][K];
  flit_t                r_in_flit   [K][K][NUM_PORTS], r_out_flit [K][K][NUM_PORTS];
  credit_t              r_cred_out  [K][K][NUM_PORTS], r_cred_in  [K][K][NUM_PORTS];
  int     created [K][K], ejected [K][K], wflits [K][K], wpkts [K][K], errors [K][K];
  longint wlat [K][K];
  logic   idle [K][K];

  for (genvar x = 0; x < K; x++) begin : g_x
    for (genvar y = 0; y < K; y++) begin : g_y
      dsb_router #(.NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH), .NUM_MM(NUM_MM), .MM_DEPTH(MM_DEPTH)) u_router (
        .clk, .rst_n, .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .in_valid(r_in_valid[x][y]), .in_flit(r_in_flit[x][y]), .credit_out(r_cred_out[x][y]),
        .out_valid(r_out_valid[x][y]), .out_flit(r_out_flit[x][y]), .credit_in(r_cred_in[x][y])
      );
      mesh_endpoint #(.K(K), .MY_X(x), .MY_Y(y), .NUM_VC(NUM_VC), .VC_DEPTH(VC_DEPTH)) u_ep (
        .clk, .rst_n, .pattern, .rate_ppm, .inject, .measure, .now,
        .in_valid(r_in_valid[x][y][PORT_LOCAL]), .in_flit(r_in_flit[x][y][PORT_LOCAL]),
        .credit_out(r_cred_out[x][y][PORT_LOCAL]),
        .out_valid(r_out_valid[x][y][PORT_LOCAL]), .out_flit(r_out_flit[x][y][PORT_LOCAL]),
        .credit_in(r_cred_in[x][y][PORT_LOCAL]),
        .created(created[x][y]), .ejected_pkts(ejected[x][y]), .window_flits(wflits[x][y]),
        .window_lat_sum(wlat[x][y]), .window_pkts(wpkts[x][y]), .errors(errors[x][y]),
        .idle(idle[x][y])
      );
      // links: north output feeds the south input of the router above, etc.
      if (y < K - 1) begin : g_n
        assign r_in_valid[x][y][PORT_NORTH] = r_out_valid[x][y+1][PORT_SOUTH];
        assign r_in_flit [x][y][PORT_NORTH] = r_out_flit [x][y+1][PORT_SOUTH];
        assign r_cred_in [x][y][PORT_NORTH] = r_cred_out [x][y+1][PORT_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[x][y][PORT_NORTH] = 1'b0;
        assign r_in_flit [x][y][PORT_NORTH] = '0;
        assign r_cred_in [x][y][PORT_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[x][y][PORT_SOUTH] = r_out_valid[x][y-1][PORT_NORTH];
        assign r_in_flit [x][y][PORT_SOUTH] = r_out_flit [x][y-1][PORT_NORTH];
        assign r_cred_in [x][y][PORT_SOUTH] = r_cred_out [x][y-1][PORT_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[x][y][PORT_SOUTH] = 1'b0;
        assign r_in_flit [x][y][PORT_SOUTH] = '0;
        assign r_cred_in [x][y][PORT_SOUTH] = '0;
      end
      if (x < K - 1) begin : g_e
        assign r_in_valid[x][y][PORT_EAST] = r_out_valid[x+1][y][PORT_WEST];
        assign r_in_flit [x][y][PORT_EAST] = r_out_flit [x+1][y][PORT_WEST];
        assign r_cred_in [x][y][PORT_EAST] = r_cred_out [x+1][y][PORT_WEST];
      end else begin : g_e_edge
        assign r_in_valid[x][y][PORT_EAST] = 1'b0;
        assign r_in_flit [x][y][PORT_EAST] = '0;
        assign r_cred_in [x][y][PORT_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[x][y][PORT_WEST] = r_out_valid[x-1][y][PORT_EAST];
        assign r_in_flit [x][y][PORT_WEST] = r_out_flit [x-1][y][PORT_EAST];
        assign r_cred_in [x][y][PORT_WEST] = r_cred_out [x-1][y][PORT_EAST];
      end else begin : g_w_edge
        assign r_in_valid[x][y][PORT_WEST] = 1'b0;
        assign r_in_flit [x][y][PORT_WEST] = '0;
        assign r_cred_in [x][y][PORT_WEST] = '0;
      end
    end
  end

  always_comb begin
    tot_created = 0; tot_ejected = 0; tot_wflits = 0; tot_wpkts = 0; tot_wlat = 0;
    tot_errors = 0; all_idle = 1'b1;
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++) begin
        tot_created += created[x][y]; tot_ejected += ejected[x][y];
        tot_wflits += wflits[x][y]; tot_wpkts += wpkts[x][y]; tot_wlat += wlat[x][y];
        tot_errors += errors[x][y]; all_idle &= idle[x][y];
      end
  end
endmodule
