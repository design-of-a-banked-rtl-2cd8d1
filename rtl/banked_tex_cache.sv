// Banked texture cache: serves the four texels of a bilinear footprint in one
// access.
//
// A 16 KB, 2-way cache with 64-byte lines is split into four data banks, each
// holding a quarter of every line, and four tag banks, each holding a quarter
// of the sets. Every bank has one port, yet a bilinear quad (four texels from
// AT0..AT3) is read in one cycle because the placement keeps the four texels
// in four different banks:
//   * tag path: tag control sends one index to each tag bank that is asked for;
//     tag compare picks each request's tag bank and compares both ways.
//   * data path, DESIGN = DB_INTERLEAVED (the thesis's design v2): texel t of
//     a line lives in bank {t[TILE_LOG2], t[0]}; address control switches each
//     request to its bank and all four banks return one texel.
//   * data path, DESIGN = DB_CONTINUOUS (design v1): bank j holds texels
//     4j..4j+3 of each line; address control enables only the banks asked for
//     (one, two or four) and each returns a quarter line; word select and the
//     outside-bank column select pick the four texels.
// On a miss the lines are fetched one at a time and each refill writes the
// same row of all four data banks and one tag entry, as the thesis
// prescribes; then the quad is looked up again.
//
// Interface and timing (this design's choices):
//   req_*  : valid/ready; a request is taken whenever req_ready is 1 (idle).
//   rsp_*  : rsp_valid pulses one cycle after the access that hits on all four
//            texels, so a quad that hits has a latency of one cycle and a
//            throughput of one quad per cycle. rsp_texel[i] belongs to req_addr[i].
//   mem_*  : line fill. mem_req_valid holds mem_req_addr (line aligned) until
//            mem_req_ready; the memory later returns the whole line on
//            mem_rsp_line with mem_rsp_valid, texel k in bits [32k +: 32].
//   acc_*  : one pulse per cache access (every lookup, also the retry after a
//            refill) with its hit flag and the number of tag and data banks it
//            enabled; acc_conflict flags two requests that need different rows
//            of one bank, which RZ placement with 64-byte lines never produces.
// The victim way of a set is chosen round-robin (one pointer bit per set);
// the thesis does not name a replacement policy.
module banked_tex_cache
  import tex_cache_pkg::*;
#(
  parameter db_design_e  DESIGN    = DB_INTERLEAVED,
  parameter int unsigned TILE_LOG2 = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // texel requests from the address translation array
  input  logic              req_valid,
  output logic              req_ready,
  input  addr_t             req_addr [4],
  // texels to the texture filter
  output logic              rsp_valid,
  output texel_t            rsp_texel [4],
  // line fill from texture memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output addr_t             mem_req_addr,
  input  logic              mem_rsp_valid,
  input  logic [LINE_W-1:0] mem_rsp_line,
  // per-access statistics
  output logic              acc_valid,
  output logic              acc_hit,
  output logic [2:0]        acc_tbanks,
  output logic [2:0]        acc_dbanks,
  output logic              acc_conflict
);
  localparam int unsigned ROW_W = $clog2(LINES);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_RETRY} state_e;
  state_e state;

  addr_t held [4];
  addr_t miss_line;

  // ---------------------------------------------------------------- lookup
  addr_t la [4];
  logic  lookup;

  always_comb begin
    for (int i = 0; i < 4; i++) la[i] = (state == S_IDLE) ? req_addr[i] : held[i];
    lookup = (state == S_IDLE && req_valid) || state == S_RETRY;
  end

  // ---------------------------------------------------------------- tag path
  logic [TB_SET_W-1:0] tb_index [4];
  logic [3:0]          tb_en;
  tag_entry_t          tb_rd [4][WAYS];
  logic [3:0]          hit;
  logic [WAY_W-1:0]    way [4];

  // refill write controls
  logic              fill;
  logic [SET_W-1:0]  fill_set;
  logic [WAY_W-1:0]  fill_way;
  logic [ROW_W-1:0]  fill_row;
  logic [WAYS-1:0]   victim_ptr [SETS];

  tag_ctrl u_tag_ctrl (.addr(la), .tb_index(tb_index), .tb_en(tb_en));

  for (genvar j = 0; j < 4; j++) begin : g_tb
    tag_bank u_tb (
      .clk, .rst_n,
      .rd_en(tb_en[j] & lookup), .rd_index(tb_index[j]), .rd_entry(tb_rd[j]),
      .wr_en(fill && tag_bank_of(miss_line) == 2'(j)),
      .wr_index(tb_index_of(miss_line)), .wr_way(fill_way), .wr_tag(tag_of(miss_line))
    );
  end

  tag_compare u_tag_cmp (.addr(la), .tb_rd(tb_rd), .hit(hit), .way(way));

  // ---------------------------------------------------------------- data path
  texel_t texel [4];
  texel_t fill_row_data [4][BANK_TEXELS];
  logic [3:0] db_en;
  logic       conflict;

  always_comb
    for (int j = 0; j < 4; j++)
      for (int p = 0; p < BANK_TEXELS; p++)
        if (DESIGN == DB_CONTINUOUS)
          fill_row_data[j][p] = mem_rsp_line[(4*j + p)*TEXEL_W +: TEXEL_W];
        else
          fill_row_data[j][p] =
            mem_rsp_line[32'(intl_texel(bank_id_t'(j), POS_W'(p), TILE_LOG2))*TEXEL_W +: TEXEL_W];

  if (DESIGN == DB_INTERLEAVED) begin : g_intl
    localparam int unsigned PW = ROW_W + POS_W;
    bank_id_t         bid [4];
    logic [PW-1:0]    pl  [4];
    logic [PW-1:0]    bank_pl [4];
    texel_t           dout [4][1];

    always_comb
      for (int i = 0; i < 4; i++) begin
        bid[i] = intl_bank_of(texel_in_line(la[i]), TILE_LOG2);
        pl[i]  = {set_of(la[i]), way[i], intl_pos_of(texel_in_line(la[i]), TILE_LOG2)};
      end

    addr_ctrl_intl #(.W(PW)) u_addr_ctrl (.bank_id(bid), .addr_in(pl), .bank_addr(bank_pl));

    for (genvar j = 0; j < 4; j++) begin : g_db
      data_bank #(.ROWS(LINES), .OUT_TEXELS(1)) u_db (
        .clk,
        .rd_en(lookup), .rd_row(bank_pl[j][PW-1:POS_W]), .rd_pos(bank_pl[j][POS_W-1:0]),
        .rd_data(dout[j]),
        .wr_en(fill), .wr_row(fill_row), .wr_data(fill_row_data[j])
      );
    end

    always_comb begin
      db_en    = {4{lookup}};
      conflict = 1'b0;
      for (int i = 0; i < 4; i++) begin
        texel[i] = dout[bid[i]][0];
        for (int k = i + 1; k < 4; k++) if (bid[i] == bid[k]) conflict = 1'b1;
      end
    end
  end else begin : g_cont
    bank_id_t         bid [4];
    logic [ROW_W-1:0] row [4];
    logic [ROW_W-1:0] bank_row [4];
    logic [1:0]       bank_sel [4];
    logic [3:0]       bank_en;
    logic [TOFF_W-1:0] toff [4];
    bank_id_t         mux_id [4];
    logic [POS_W-1:0] col_sel [4];
    texel_t           dout [4][BANK_TEXELS];
    texel_t           col_out [4];

    always_comb
      for (int i = 0; i < 4; i++) begin
        toff[i] = texel_in_line(la[i]);
        bid[i]  = cont_bank_of(toff[i]);
        row[i]  = {set_of(la[i]), way[i]};
      end

    addr_ctrl_cont #(.W(ROW_W)) u_addr_ctrl (
      .bank_id(bid), .addr_in(row), .bank_addr(bank_row), .bank_sel(bank_sel), .bank_en(bank_en)
    );

    for (genvar j = 0; j < 4; j++) begin : g_db
      data_bank #(.ROWS(LINES), .OUT_TEXELS(BANK_TEXELS)) u_db (
        .clk,
        .rd_en(bank_en[j] & lookup), .rd_row(bank_row[j]), .rd_pos('0), .rd_data(dout[j]),
        .wr_en(fill), .wr_row(fill_row), .wr_data(fill_row_data[j])
      );
    end

    word_select #(.TILE_LOG2(TILE_LOG2)) u_word_sel (.toff(toff), .mux_id(mux_id), .col_sel(col_sel));
    column_select #(.TILE_LOG2(TILE_LOG2)) u_col_sel (.bank_row(dout), .col_sel(col_sel), .col_out(col_out));

    always_comb begin
      db_en    = bank_en & {4{lookup}};
      conflict = 1'b0;
      for (int i = 0; i < 4; i++) begin
        texel[i] = col_out[mux_id[i]];
        if (bid[i] != bid[bank_sel[bid[i]]] || row[i] != bank_row[bid[i]]) conflict = 1'b1;
        for (int k = i + 1; k < 4; k++) if (mux_id[i] == mux_id[k]) conflict = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- tag bank conflicts
  logic tag_conflict;
  always_comb begin
    tag_conflict = 1'b0;
    for (int i = 0; i < 4; i++)
      if (tb_index_of(la[i]) != tb_index[tag_bank_of(la[i])]) tag_conflict = 1'b1;
  end

  // ---------------------------------------------------------------- miss control
  logic  all_hit;
  addr_t first_miss;

  always_comb begin
    all_hit    = &hit;
    first_miss = '0;
    for (int i = 3; i >= 0; i--)
      if (!hit[i]) first_miss = {la[i][ADDR_W-1:OFF_W], OFF_W'(0)};
    fill     = (state == S_WAIT) && mem_rsp_valid;
    fill_set = set_of(miss_line);
    fill_way = WAY_W'(victim_ptr[fill_set]);
    fill_row = {fill_set, fill_way};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) victim_ptr[s] <= '0;
    end else if (fill) begin
      victim_ptr[fill_set] <= (victim_ptr[fill_set] == WAYS'(WAYS - 1)) ? '0
                                                                         : victim_ptr[fill_set] + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_IDLE;
      miss_line <= '0;
      for (int i = 0; i < 4; i++) held[i] <= '0;
    end else begin
      case (state)
        S_IDLE, S_RETRY:
          if (lookup) begin
            if (state == S_IDLE) held <= req_addr;
            if (all_hit) state <= S_IDLE;
            else begin
              state     <= S_REQ;
              miss_line <= first_miss;
            end
          end
        S_REQ:  if (mem_req_ready) state <= S_WAIT;
        S_WAIT: if (mem_rsp_valid) state <= S_RETRY;
        default: state <= S_IDLE;
      endcase
    end

  assign req_ready     = (state == S_IDLE);
  assign mem_req_valid = (state == S_REQ);
  assign mem_req_addr  = miss_line;

  // ---------------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rsp_valid    <= 1'b0;
      acc_valid    <= 1'b0;
      acc_hit      <= 1'b0;
      acc_tbanks   <= '0;
      acc_dbanks   <= '0;
      acc_conflict <= 1'b0;
      for (int i = 0; i < 4; i++) rsp_texel[i] <= '0;
    end else begin
      rsp_valid    <= lookup && all_hit;
      acc_valid    <= lookup;
      acc_hit      <= lookup && all_hit;
      acc_tbanks   <= 3'($countones(tb_en));
      acc_dbanks   <= 3'($countones(db_en));
      acc_conflict <= lookup && (conflict || tag_conflict);
      if (lookup && all_hit) rsp_texel <= texel;
    end

  // A bilinear quad must never need two rows of one bank.
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    lookup |-> !(conflict || tag_conflict));
  // The fill request is held until the memory takes it.
  a_mem_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
endmodule
