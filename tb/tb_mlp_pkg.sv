`timescale 1ps / 1fs
// tb_mlp_pkg: test-side description of a two-layer int8 network
// (IN inputs -> HID hidden ReLU neurons -> 1 linear output) for the
// accelerator: its weights (a fixed hash, so no data files are needed), the
// weight-memory image, the program, and an integer reference model computed
// directly from the weights, independently of the hardware.
//
// Memory layout used by the program (N = array size, T = ceil(IN/N) input
// tiles, H = ceil(HID/N) hidden tiles):
//   I/O rows   tile t of vector n at t*N + n (the pre-processing layout),
//              hidden tile h of vector n at T*N + h*N + n
//   weights    layer-1 tile (o,t) at (o*T + t)*N, row r = input t*N+r,
//              lane c = hidden o*N+c; layer-2 tile h at W2 + h*N;
//              bias rows after the weight tiles
// The network shape and int8 arithmetic come from the document; the hashed
// weights, the power-of-two scales and the memory layout are this design's own.
package tb_mlp_pkg;
  import tdc_pkg::*;

  localparam int SHIFT1  = 4;   // hidden requantisation shift
  localparam int BSHIFT1 = 2;   // hidden bias scale
  localparam int BSHIFT2 = 4;   // output bias scale

  function automatic int hash8(input int layer, input int i, input int j, input int seed);
    logic [31:0] h;
    h = 32'(i) * 32'h9E3779B1 ^ 32'(j) * 32'h85EBCA77 ^ 32'(layer) * 32'hC2B2AE3D ^ 32'(seed) * 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 13);
    return int'(h[7:0]) - 128;
  endfunction

  // Weights in [-16, 15]; zero outside the real network (padding lanes).
  function automatic int w1(input int i, input int j, input int IN, input int HID, input int seed);
    if (i >= IN || j >= HID) return 0;
    return hash8(1, i, j, seed) / 8;
  endfunction
  function automatic int w2(input int j, input int HID, input int seed);
    if (j >= HID) return 0;
    return hash8(2, j, 0, seed) / 8;
  endfunction
  function automatic int b1(input int j, input int HID, input int seed);
    if (j >= HID) return 0;
    return hash8(3, j, 0, seed);
  endfunction
  function automatic int b2(input int seed);
    return hash8(4, 0, 0, seed);
  endfunction

  function automatic int n_tiles(input int n, input int N);
    return (n + N - 1) / N;
  endfunction

  // Address of the first layer-2 weight row and of the bias rows.
  function automatic int w2_base(input int IN, input int HID, input int N);
    return n_tiles(HID, N) * n_tiles(IN, N) * N;
  endfunction
  function automatic int b1_base(input int IN, input int HID, input int N);
    return w2_base(IN, HID, N) + n_tiles(HID, N) * N;
  endfunction
  function automatic int b2_addr(input int IN, input int HID, input int N);
    return b1_base(IN, HID, N) + n_tiles(HID, N);
  endfunction
  function automatic int wm_rows(input int IN, input int HID, input int N);
    return b2_addr(IN, HID, N) + 1;
  endfunction

  // Lane c of weight-memory row `row`.
  function automatic logic [7:0] wm_lane(input int row, input int c, input int IN,
                                         input int HID, input int N, input int seed);
    int T, H, tile, r, o, t;
    T = n_tiles(IN, N);
    H = n_tiles(HID, N);
    if (row < w2_base(IN, HID, N)) begin
      tile = row / N; r = row % N; o = tile / T; t = tile % T;
      return 8'(w1(t*N + r, o*N + c, IN, HID, seed));
    end else if (row < b1_base(IN, HID, N)) begin
      tile = (row - w2_base(IN, HID, N)) / N; r = (row - w2_base(IN, HID, N)) % N;
      return (c == 0) ? 8'(w2(tile*N + r, HID, seed)) : 8'd0;
    end else if (row < b2_addr(IN, HID, N)) begin
      o = row - b1_base(IN, HID, N);
      return 8'(b1(o*N + c, HID, seed));
    end else begin
      return (c == 0) ? 8'(b2(seed)) : 8'd0;
    end
  endfunction

  function automatic instr_t mk(input opcode_e op, input int w_addr, input int io_addr,
                                input int vrf_addr, input bit acc, input bit relu,
                                input bit out, input int shift, input int bshift);
    instr_t i;
    i = '0;
    i.op = op; i.w_addr = WM_AW'(w_addr); i.io_addr = IO_AW'(io_addr);
    i.vrf_addr = VRF_AW'(vrf_addr); i.acc = acc; i.relu = relu; i.out = out;
    i.shift = 5'(shift); i.bshift = 5'(bshift);
    return i;
  endfunction

  // The program, one instruction per call (returns HALT past the end).
  function automatic instr_t prog(input int pc, input int IN, input int HID, input int N);
    int T, H, p;
    T = n_tiles(IN, N);
    H = n_tiles(HID, N);
    p = 0;
    for (int o = 0; o < H; o++) begin
      for (int t = 0; t < T; t++) begin
        if (pc == p)     return mk(OP_LOADW, (o*T + t)*N, 0, 0, 0, 0, 0, 0, 0);
        if (pc == p + 1) return mk(OP_MATMUL, 0, t*N, 0, t != 0, 0, 0, 0, 0);
        p += 2;
      end
      if (pc == p) return mk(OP_ACT, b1_base(IN, HID, N) + o, T*N + o*N, 0, 0, 1, 0, SHIFT1, BSHIFT1);
      p += 1;
    end
    for (int h = 0; h < H; h++) begin
      if (pc == p)     return mk(OP_LOADW, w2_base(IN, HID, N) + h*N, 0, 0, 0, 0, 0, 0, 0);
      if (pc == p + 1) return mk(OP_MATMUL, 0, T*N + h*N, 0, h != 0, 0, 0, 0, 0);
      p += 2;
    end
    if (pc == p) return mk(OP_ACT, b2_addr(IN, HID, N), (T + H)*N, 0, 0, 0, 1, 0, BSHIFT2);
    return mk(OP_HALT, 0, 0, 0, 0, 0, 0, 0, 0);
  endfunction

  function automatic int prog_len(input int IN, input int HID, input int N);
    return 2 * n_tiles(HID, N) * n_tiles(IN, N) + n_tiles(HID, N) + 2 * n_tiles(HID, N) + 2;
  endfunction

  // Reference: timestamp for one raw vector (bit i is input i, worth 0 or 1).
  function automatic int reference(input logic [FIFO_W-1:0] v, input int IN, input int HID,
                                   input int seed);
    longint y;
    y = longint'(b2(seed)) <<< BSHIFT2;
    for (int j = 0; j < HID; j++) begin
      longint a, h;
      a = longint'(b1(j, HID, seed)) <<< BSHIFT1;
      for (int i = 0; i < IN; i++) if (v[i]) a += longint'(w1(i, j, IN, HID, seed));
      h = a >>> SHIFT1;
      if (h < 0)   h = 0;
      if (h > 127) h = 127;
      y += h * w2(j, HID, seed);
    end
    return int'(y);
  endfunction

endpackage
