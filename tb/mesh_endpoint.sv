// mesh_endpoint: the processor side of one mesh node, for workload tests.
// It creates 5-flit packets at a given rate (open loop, queued without
// limit), addressed by a synthetic traffic pattern, and injects them into the
// router's local input over its VCs with credit flow control. It consumes
// every flit the router ejects at once, returning the credit next cycle, and
// checks that ejected flits belong here, arrive in packet order on their VC
// and carry an intact payload. Packet latency runs from the cycle the head
// flit is injected to the cycle the tail flit is consumed.
//   pattern 0 uniform random, 1 bit complement (k-1-x, k-1-y),
//   pattern 2 tornado (x + ceil(k/2) - 1, y + ceil(k/2) - 1) mod k.
module mesh_endpoint
  import dsb_pkg::*;
#(
  parameter int K        = 4,
  parameter int MY_X     = 0,
  parameter int MY_Y     = 0,
  parameter int NUM_VC   = DEF_NUM_VC,
  parameter int VC_DEPTH = DEF_VC_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  int      pattern,
  input  int      rate_ppm,      // offered flits per node per cycle, x 1e6
  input  logic    inject,        // create new packets
  input  logic    measure,       // count ejections and latencies now
  input  int      now,
  // router local port
  output logic    in_valid,
  output flit_t   in_flit,
  input  credit_t credit_out,
  input  logic    out_valid,
  input  flit_t   out_flit,
  output credit_t credit_in,
  // statistics
  output int      created,
  output int      ejected_pkts,
  output int      window_flits,
  output longint  window_lat_sum,
  output int      window_pkts,
  output int      errors,
  output logic    idle
);
  localparam int PKT_LEN = 5;

  int q_dx [$], q_dy [$];
  int up_credit [NUM_VC];
  int up_left   [NUM_VC];
  int up_dx [NUM_VC], up_dy [NUM_VC], up_serial [NUM_VC], up_t0 [NUM_VC];
  int dn_src [NUM_VC], dn_serial [NUM_VC], dn_idx [NUM_VC];
  int serial;

  function automatic logic [63:0] tag(int sx, int sy, int s, int idx);
    return {32'(s) * 32'h9E37_79B1 ^ 32'(sx * 16 + sy), 32'(idx) ^ 32'hC3A5_0000};
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_dx.delete(); q_dy.delete();
      for (int v = 0; v < NUM_VC; v++) begin
        up_credit[v] = VC_DEPTH; up_left[v] = 0; dn_src[v] = -1;
      end
      serial = 0; created = 0; ejected_pkts = 0; window_flits = 0; window_lat_sum = 0;
      window_pkts = 0; errors = 0;
      in_valid <= 1'b0; in_flit <= '0; credit_in <= '0; idle <= 1'b1;
    end else begin
      // create
      if (inject && ($urandom % 1000000) < rate_ppm / PKT_LEN) begin
        int dx, dy;
        case (pattern)
          1: begin dx = K - 1 - MY_X; dy = K - 1 - MY_Y; end
          2: begin dx = (MY_X + (K + 1) / 2 - 1) % K; dy = (MY_Y + (K + 1) / 2 - 1) % K; end
          default: begin
            do begin dx = $urandom % K; dy = $urandom % K; end while (dx == MY_X && dy == MY_Y);
          end
        endcase
        if (!(dx == MY_X && dy == MY_Y)) begin
          q_dx.push_back(dx); q_dy.push_back(dy); created++;
        end
      end
      // credits back
      if (credit_out.valid) up_credit[int'(credit_out.vc)]++;
      // inject one flit
      begin
        int cand [NUM_VC];
        int nc, v;
        nc = 0; v = -1;
        for (int k = 0; k < NUM_VC; k++) if (up_left[k] > 0 && up_credit[k] > 0) cand[nc++] = k;
        if (nc > 0) v = cand[$urandom % nc];
        else if (q_dx.size() > 0) begin
          for (int k = 0; k < NUM_VC; k++) if (up_left[k] == 0 && up_credit[k] > 0) cand[nc++] = k;
          if (nc > 0) begin
            v = cand[$urandom % nc];
            up_dx[v] = q_dx.pop_front(); up_dy[v] = q_dy.pop_front();
            up_left[v] = PKT_LEN; up_serial[v] = serial++; up_t0[v] = now + 1;
          end
        end
        if (v >= 0) begin
          flit_t f;
          int idx;
          idx = PKT_LEN - up_left[v];
          f.head = (idx == 0); f.tail = (idx == PKT_LEN - 1); f.vc = VC_ID_W'(v);
          f.data = '0;
          f.data[3:0] = 4'(up_dx[v]); f.data[7:4] = 4'(up_dy[v]);
          f.data[11:8] = 4'(MY_X); f.data[15:12] = 4'(MY_Y);
          f.data[31:16] = 16'(up_serial[v]); f.data[35:32] = 4'(idx);
          f.data[63:40] = 24'(up_t0[v]);
          f.data[127:64] = tag(MY_X, MY_Y, up_serial[v], idx);
          in_valid <= 1'b1; in_flit <= f;
          up_credit[v]--; up_left[v]--;
        end else in_valid <= 1'b0;
      end
      // eject
      credit_in <= '0;
      if (out_valid) begin
        flit_t f;
        int v, src, s, idx;
        f = out_flit; v = int'(f.vc);
        src = int'(f.data[15:8]); s = int'(f.data[31:16]); idx = int'(f.data[35:32]);
        credit_in <= '{valid: 1'b1, vc: f.vc};
        if (int'(f.data[3:0]) != MY_X || int'(f.data[7:4]) != MY_Y) errors++;
        if (f.data[127:64] != tag(int'(f.data[11:8]), int'(f.data[15:12]), s, idx)) errors++;
        if (f.head) begin
          if (dn_src[v] != -1 || idx != 0) errors++;
          dn_src[v] = src; dn_serial[v] = s; dn_idx[v] = 1;
        end else begin
          if (dn_src[v] != src || dn_serial[v] != s || dn_idx[v] != idx) errors++;
          dn_idx[v]++;
        end
        if (measure) window_flits++;
        if (f.tail) begin
          if (idx != PKT_LEN - 1) errors++;
          dn_src[v] = -1;
          ejected_pkts++;
          if (measure) begin
            window_pkts++;
            window_lat_sum += longint'(now) - longint'(f.data[63:40]);
          end
        end
      end
      begin
        logic busy;
        busy = (q_dx.size() != 0);
        for (int v = 0; v < NUM_VC; v++) if (up_left[v] != 0) busy = 1'b1;
        idle <= !busy;
      end
    end
  end

endmodule
