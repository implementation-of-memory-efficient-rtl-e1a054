// ldpc_pkg: shared types, code tables and helper functions of the semi-parallel
// DVB-S2 style min-sum LDPC decoder.
//
// The code is described in groups of P variable nodes (P = 360 in the full size
// decoder). A frame of n bits is n/360 groups; k/360 of them carry information
// bits. The 21 frame modes (11 normal and 10 short code rates) are
// kept here as group counts, so a decoder built with a smaller P keeps the same
// structure with shorter frames.
//
// Edge of information group g, edge number d, lane m (0..P-1):
//   check index c = (x + m*q) mod (n-k),  q = (n-k)/P,  x = info_base(...)
// Writing x = i0 + q*j0 gives c = i0 + q*((j0+m) mod P): every lane of the group
// talks to check-node unit (m+j0) mod P at CN address i0. One edge-ROM word
// therefore serves P edges: CN address i0 and rotation j0.
// Parity bit p_c (c = i + q*j) is stored in VN lane j, VN address k/P + i, and
// connects to checks c and c+1 (dual-diagonal part of H). The second edge of
// p at i = q-1 crosses to the next CN unit (rotation 1, CN address 0); for lane
// P-1 that edge does not exist and is flagged "wrap" so the lane is masked.
//
// The base locations x of DVB-S2 are tables of the standard. This package
// replaces them by a fixed formula (info_base) with the same structure:
// DV_INFO edges per information group, spread evenly over the CN addresses.
package ldpc_pkg;

  localparam int unsigned NUM_MODES = 21;
  localparam int unsigned DV_INFO   = 3;    // edges per information bit
  localparam int unsigned VA_W      = 8;    // VN address (up to 180 groups)
  localparam int unsigned CA_W      = 8;    // CN address (up to q = 135)
  localparam int unsigned SH_W      = 9;    // rotation amount (P up to 512)
  localparam int unsigned EI_W      = 5;    // edge index within one check (up to 32)
  localparam int unsigned MODE_W    = 5;
  localparam int unsigned ITER_W    = 6;

  // One word of the edge ROM: one edge of each of the P lanes.
  typedef struct packed {
    logic [VA_W-1:0] addr_vn;   // VN RAM address (group)
    logic [CA_W-1:0] addr_cn;   // CN RAM address
    logic [SH_W-1:0] shift;     // rotation VN lane m -> CN unit (m+shift) mod P
    logic [EI_W-1:0] eidx;      // position of this edge among the edges of its check
    logic            first_vn;  // first edge of this VN group in ROM order
    logic            last_vn;   // last edge of this VN group in ROM order
    logic            wrap;      // lane P-1 has no edge in this word
  } edge_t;

  // Control bundle issued by the controller and delayed alongside the data.
  typedef struct packed {
    logic            valid;     // an edge word occupies this slot
    logic            ph;        // 0: read cycle, 1: write/compute cycle
    logic            fwd;       // 1: VN -> CN half, 0: CN -> VN half
    logic            iter0;     // first iteration (no previous messages)
    logic            last_iter; // last iteration (write posterior LLRs)
    logic            slot;      // iteration parity: selects the CN state bank
    logic [SH_W-1:0] rot;       // rotation applied by the shuffler (negated in reverse)
    edge_t           e;
  } ctl_t;

  // Frame modes: n/360 and k/360 (DVB-S2 normal and short frames).
  function automatic int unsigned mode_n_groups(int unsigned mode);
    return (mode <= 10) ? 180 : 45;
  endfunction

  function automatic int unsigned mode_k_groups(int unsigned mode);
    case (mode)
      0:  return 45;   // 1/4   normal, k = 16200
      1:  return 60;   // 1/3   normal, k = 21600
      2:  return 72;   // 2/5   normal, k = 25920
      3:  return 90;   // 1/2   normal, k = 32400
      4:  return 108;  // 3/5   normal, k = 38880
      5:  return 120;  // 2/3   normal, k = 43200
      6:  return 135;  // 3/4   normal, k = 48600
      7:  return 144;  // 4/5   normal, k = 51840
      8:  return 150;  // 5/6   normal, k = 54000
      9:  return 160;  // 8/9   normal, k = 57600
      10: return 162;  // 9/10  normal, k = 58320
      11: return 9;    // 1/5   short,  k = 3240
      12: return 15;   // 1/3   short,  k = 5400
      13: return 18;   // 2/5   short,  k = 6480
      14: return 20;   // 4/9   short,  k = 7200
      15: return 27;   // 3/5   short,  k = 9720
      16: return 30;   // 2/3   short,  k = 10800
      17: return 33;   // 11/15 short,  k = 11880
      18: return 35;   // 7/9   short,  k = 12600
      19: return 37;   // 37/45 short,  k = 13320
      default: return 40; // 8/9 short, k = 14400
    endcase
  endfunction

  // q = (n-k)/360: number of CN addresses used by a mode.
  function automatic int unsigned mode_q(int unsigned mode);
    return mode_n_groups(mode) - mode_k_groups(mode);
  endfunction

  // Edge-ROM words of one mode: DV_INFO per information group, two per parity group.
  function automatic int unsigned mode_words(int unsigned mode);
    return mode_k_groups(mode) * DV_INFO + 2 * mode_q(mode);
  endfunction

  function automatic int unsigned mode_base(int unsigned mode);
    int unsigned b = 0;
    for (int unsigned i = 0; i < NUM_MODES; i++)
      if (i < mode) b += mode_words(i);
    return b;
  endfunction

  localparam int unsigned ROM_DEPTH = mode_base(NUM_MODES);
  localparam int unsigned ROM_AW    = $clog2(ROM_DEPTH);

  // Base check location x of edge d of information group g (natural check index,
  // 0 <= x < n-k). CN address x mod q follows edge number g*DV_INFO+d round robin,
  // the rotation x / q is a fixed scramble of (g, d).
  function automatic int unsigned info_base(int unsigned mode, int unsigned g,
                                            int unsigned d, int unsigned p);
    int unsigned q  = mode_q(mode);
    int unsigned i0 = (g * DV_INFO + d) % q;
    int unsigned j0 = (g * 37 + d * 113 + g * d * 7 + mode * 11 + 5) % p;
    return i0 + q * j0;
  endfunction

  // Number of information edges that reach CN address a in a mode.
  function automatic int unsigned info_edges_at(int unsigned mode, int unsigned a);
    int unsigned t = mode_k_groups(mode) * DV_INFO;
    int unsigned q = mode_q(mode);
    return (a < t) ? (t - 1 - a) / q + 1 : 0;
  endfunction

  // Word j of the edge ROM of a mode, for P lanes.
  function automatic edge_t gen_edge(int unsigned mode, int unsigned j, int unsigned p);
    edge_t       w;
    int unsigned kg = mode_k_groups(mode);
    int unsigned q  = mode_q(mode);
    int unsigned x, r, i;
    w = '0;
    if (j < kg * DV_INFO) begin
      x          = info_base(mode, j / DV_INFO, j % DV_INFO, p);
      w.addr_vn  = VA_W'(j / DV_INFO);
      w.addr_cn  = CA_W'(x % q);
      w.shift    = SH_W'(x / q);
      w.eidx     = EI_W'(j / q);
      w.first_vn = (j % DV_INFO) == 0;
      w.last_vn  = (j % DV_INFO) == DV_INFO - 1;
    end else begin
      r          = j - kg * DV_INFO;
      i          = r / 2;
      w.addr_vn  = VA_W'(kg + i);
      w.first_vn = (r % 2) == 0;
      w.last_vn  = (r % 2) == 1;
      if (r % 2 == 0) begin          // p_c -> check c
        w.addr_cn = CA_W'(i);
        w.eidx    = EI_W'(info_edges_at(mode, i) + ((i == 0) ? 0 : 1));
      end else if (i < q - 1) begin  // p_c -> check c+1, same CN unit
        w.addr_cn = CA_W'(i + 1);
        w.eidx    = EI_W'(info_edges_at(mode, i + 1));
      end else begin                 // p_c -> check c+1 in the next CN unit
        w.addr_cn = '0;
        w.shift   = SH_W'(1);
        w.eidx    = EI_W'(info_edges_at(mode, 0) + 1);
        w.wrap    = 1'b1;
      end
    end
    return w;
  endfunction

  // Symmetric saturation of a signed value to w bits: +-(2^(w-1)-1).
  function automatic int sat_val(int v, int unsigned w);
    int lim = (1 <<< (w - 1)) - 1;
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

endpackage
