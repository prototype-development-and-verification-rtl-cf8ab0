// safil_top: the complete SAFIL IP lookup engine, an N x N array of
// processing elements wired as a 2-D torus and operated like a systolic
// array (N = 8 by default, the document's main configuration).
//
// Structure:
//   * 16 selector units (one per address input) split each address by its
//     first four bits into one of 16 partitions and send a lookup frame to
//     that partition's contention resolver (CR). CRs 0..N-1 sit on the
//     north side, in front of column 0..N-1; CRs N..2N-1 on the west side,
//     in front of row 0..N-1 (this design's numbering).
//   * PE(r,c) takes frames from its west neighbour (or the row CR when
//     c = 0) and its north neighbour (or the column CR when r = 0). Its
//     east output feeds PE(r,c+1); the last PE of a row feeds the row CR
//     back (wrap-around). Its south output feeds PE(r+1,c); the last PE of
//     a column feeds the column CR back. A search can therefore wind round
//     a row or column as often as its trie path needs.
//   * Every PE reports its result on its own backplane port:
//     port[r*N+c] with port_av[r*N+c] as a one-cycle strobe.
//   * The RAM data loader turns the 52-bit update_data word
//     {node[31:0], address[12:0], pe_id[5:0], U} into an update frame for
//     the north CR of the target column; U = 1 marks a valid word.
//   * The congestion control unit watches all PE almost-full flags and
//     drives data_in_enable (one bit per selector unit, bit i for input i).
//     A selector unit that is not enabled refuses its input.
// Latency of one lookup step is two cycles per PE; a search of d trie
// levels takes about 2 + 2 + 2d cycles from address to result.
// drop_count counts frames lost to full FIFOs anywhere in the system;
// data_refused[i] pulses when input i offered an address while disabled.
module safil_top
  import safil_pkg::*;
#(
  parameter int unsigned N                 = 8,
  parameter int unsigned NUM_SU            = 16,
  parameter int unsigned PE_FIFO_DEPTH     = 1024,
  parameter int unsigned ALMOST_FULL_LEVEL = 512,
  parameter int unsigned CR_FIFO_DEPTH     = 2048,
  parameter int unsigned MEM_ADDR_W        = IDX_W
) (
  input  logic                clock,
  input  logic                reset,
  input  logic [IP_W-1:0]     data_in        [NUM_SU],
  input  logic                data_av_in     [NUM_SU],
  input  logic [UPD_IN_W-1:0] update_data,
  output logic [PORT_W-1:0]   port           [N*N],
  output logic                port_av        [N*N],
  output logic [NUM_SU-1:0]   data_in_enable,
  output logic [NUM_SU-1:0]   data_refused,
  output logic [31:0]         drop_count
);
  localparam int unsigned NUM_CR = 2 * N;
  localparam int unsigned PRIO   = NUM_SU;       // CR port of the PE
  localparam int unsigned RDLP   = NUM_SU + 1;   // CR port of the loader

  // ---------------------------------------------------------------- SUs
  logic   su_av    [NUM_SU][NUM_CR];
  frame_t su_frame [NUM_SU][NUM_CR];
  logic   su_refused [NUM_SU];

  for (genvar s = 0; s < NUM_SU; s++) begin : g_su
    safil_su #(.NUM_OUT(NUM_CR)) u_su (
      .clk(clock), .rst(reset), .enable(data_in_enable[s]),
      .data_av_in(data_av_in[s]), .data_in(data_in[s]),
      .data_av_out(su_av[s]), .data_out(su_frame[s]), .refused(su_refused[s]));
  end

  always_comb begin
    for (int s = 0; s < NUM_SU; s++) data_refused[s] = su_refused[s];
  end

  // ---------------------------------------------------------------- RDL
  logic   rdl_av    [N];
  frame_t rdl_frame [N];

  safil_rdl #(.NUM_COL(N)) u_rdl (
    .clk(clock), .rst(reset),
    .data_update_av_in(update_data[0]),
    .ram_data_in(update_data[UPD_IN_W-1 -: NODE_W]),
    .ram_address_in(update_data[PEID_W+1 +: IDX_W]),
    .pe_id_in(update_data[1 +: PEID_W]),
    .data_update_av_out(rdl_av), .data_update_out(rdl_frame));

  // ------------------------------------------------------------ PE grid
  logic   east_av  [N][N], south_av [N][N];
  frame_t east_d   [N][N], south_d  [N][N];
  logic   cr_av    [NUM_CR];
  frame_t cr_d     [NUM_CR];
  logic   cr_drop  [NUM_CR];
  logic   pe_af    [N][N];
  logic   pe_drop  [N][N];

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic   w_av, n_av;
      frame_t w_d, n_d;
      if (c == 0) begin : g_wcr
        assign w_av = cr_av[N + r];
        assign w_d  = cr_d[N + r];
      end else begin : g_wpe
        assign w_av = east_av[r][c-1];
        assign w_d  = east_d[r][c-1];
      end
      if (r == 0) begin : g_ncr
        assign n_av = cr_av[c];
        assign n_d  = cr_d[c];
      end else begin : g_npe
        assign n_av = south_av[r-1][c];
        assign n_d  = south_d[r-1][c];
      end
      safil_pe #(
        .ROW_ID(ROWID_W'(r)), .FIFO_DEPTH(PE_FIFO_DEPTH),
        .ALMOST_FULL_LEVEL(ALMOST_FULL_LEVEL), .MEM_ADDR_W(MEM_ADDR_W)
      ) u_pe (
        .clk(clock), .rst(reset),
        .data_av_in_west(w_av), .data_in_west(w_d),
        .data_av_in_north(n_av), .data_in_north(n_d),
        .data_av_out_east(east_av[r][c]), .data_out_east(east_d[r][c]),
        .data_av_out_south(south_av[r][c]), .data_out_south(south_d[r][c]),
        .data_backplane(port[r*N+c]), .backplane_av(port_av[r*N+c]),
        .fifo_almost_full(pe_af[r][c]), .fifo_dropped(pe_drop[r][c]));
    end
  end

  // ---------------------------------------------------------------- CRs
  for (genvar k = 0; k < NUM_CR; k++) begin : g_cr
    localparam bit NORTH = (k < N);
    localparam int unsigned NIN = NORTH ? NUM_SU + 2 : NUM_SU + 1;
    logic   in_av [NIN];
    frame_t in_d  [NIN];
    for (genvar s = 0; s < NUM_SU; s++) begin : g_in
      assign in_av[s] = su_av[s][k];
      assign in_d[s]  = su_frame[s][k];
    end
    if (NORTH) begin : g_n
      assign in_av[PRIO] = south_av[N-1][k];
      assign in_d[PRIO]  = south_d[N-1][k];
      assign in_av[RDLP] = rdl_av[k];
      assign in_d[RDLP]  = rdl_frame[k];
    end else begin : g_w
      assign in_av[PRIO] = east_av[k-N][N-1];
      assign in_d[PRIO]  = east_d[k-N][N-1];
    end
    safil_cr #(.NUM_IN(NIN), .PRIO_PORT(PRIO), .FIFO_DEPTH(CR_FIFO_DEPTH)) u_cr (
      .clk(clock), .rst(reset), .data_av_in(in_av), .data_in(in_d),
      .data_av_out(cr_av[k]), .data_out(cr_d[k]), .dropped(cr_drop[k]));
  end

  // ---------------------------------------------------------------- CCU
  logic [N*N-1:0] af_flat;
  always_comb begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        af_flat[r*N+c] = pe_af[r][c];
  end

  safil_ccu #(.NUM_FIFO(N*N), .NUM_SU(NUM_SU)) u_ccu (
    .clk(clock), .rst(reset), .fifo_full(af_flat), .su_control(data_in_enable));

  // ------------------------------------------------------- drop counter
  logic [7:0] drops_now;
  always_comb begin
    drops_now = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        drops_now += 8'(pe_drop[r][c]);
    for (int k = 0; k < NUM_CR; k++)
      drops_now += 8'(cr_drop[k]);
  end

  always_ff @(posedge clock) begin
    if (reset) drop_count <= '0;
    else       drop_count <= drop_count + 32'(drops_now);
  end
endmodule
