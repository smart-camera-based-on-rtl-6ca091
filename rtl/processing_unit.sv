// processing_unit: the set of hardware processing modules of the
// coprocessor and the multiplexer that gives the active one the shared
// memory bus.
//
// Holds one instance of each module: median filter, local adaptive
// binarization, binary shape search, transposition, high pass filter and
// dilation plus subsampling. start and cfg come from the processing
// controller; the module whose opcode matches cfg.op is started and
// connected to the memory port m until it signals done, which is passed on.
// All modules share one input and one output bus, the memory bus, so one
// module works at a time and a chain of tasks is a sequence of
// memory-to-memory passes; the same module may be used several times in a
// chain. Shape search results (best score and position) are kept on
// best_* until the next search.
// The module set and the single shared memory bus follow the source design;
// the opcode decoding and the multiplexer are this design's choice.
module processing_unit import cop_pkg::*; #(
  parameter int MAX_W   = 2048,  // longest image row in the line caches
  parameter int SHAPE_M = 32     // shape size of the shape search
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  task_t cfg,
  input  logic signed [15:0] coef [HPF_TAPS],
  output logic  done,
  output logic [15:0] best_score,
  output dim_t  best_i,
  output dim_t  best_j,
  mem_if.master m
);
  localparam int NMOD = 6;
  mem_if #(.AW(AW), .DW(DW)) mp [NMOD] ();
  logic [NMOD-1:0] st, dn, bz;
  op_e   cur;

  // module index per opcode
  function automatic int idx_of(op_e op);
    case (op)
      OP_MEDIAN:    return 0;
      OP_NIBLACK:   return 1;
      OP_SHAPE:     return 2;
      OP_TRANSPOSE: return 3;
      OP_HPF:       return 4;
      OP_DILSUB:    return 5;
      default:      return NMOD;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cur <= OP_END;
    else if (start) cur <= cfg.op;
  end

  always_comb
    for (int k = 0; k < NMOD; k++) st[k] = start && (idx_of(cfg.op) == k);

  median_filter    #(.MAX_W(MAX_W)) u_med (.clk, .rst_n, .start(st[0]), .cfg, .busy(bz[0]), .done(dn[0]), .m(mp[0]));
  niblack_binarize #(.MAX_W(MAX_W)) u_nib (.clk, .rst_n, .start(st[1]), .cfg, .busy(bz[1]), .done(dn[1]), .m(mp[1]));
  shape_search     #(.M(SHAPE_M))   u_shp (.clk, .rst_n, .start(st[2]), .cfg, .busy(bz[2]), .done(dn[2]),
                                           .best_score, .best_i, .best_j, .m(mp[2]));
  transpose4                        u_trp (.clk, .rst_n, .start(st[3]), .cfg, .busy(bz[3]), .done(dn[3]), .m(mp[3]));
  highpass_filter  #(.MAX_W(MAX_W)) u_hpf (.clk, .rst_n, .start(st[4]), .cfg, .coef, .busy(bz[4]), .done(dn[4]), .m(mp[4]));
  dilate_subsample #(.MAX_W(MAX_W)) u_dil (.clk, .rst_n, .start(st[5]), .cfg, .busy(bz[5]), .done(dn[5]), .m(mp[5]));

  // bus multiplexer: the module of the current opcode owns the port
  logic          req_v [NMOD];
  logic          we_v  [NMOD];
  addr_t         addr_v [NMOD];
  word_t         wdata_v [NMOD];
  for (genvar k = 0; k < NMOD; k++) begin : g_bus
    assign req_v[k]   = mp[k].req;
    assign we_v[k]    = mp[k].we;
    assign addr_v[k]  = mp[k].addr;
    assign wdata_v[k] = mp[k].wdata;
    assign mp[k].gnt    = (idx_of(cur) == k) && m.gnt;
    assign mp[k].rvalid = (idx_of(cur) == k) && m.rvalid;
    assign mp[k].rdata  = m.rdata;
  end

  always_comb begin
    m.req = 1'b0; m.we = 1'b0; m.addr = '0; m.wdata = '0;
    for (int k = 0; k < NMOD; k++)
      if (idx_of(cur) == k) begin
        m.req = req_v[k]; m.we = we_v[k]; m.addr = addr_v[k]; m.wdata = wdata_v[k];
      end
  end

  // an opcode without a module completes at once
  logic bad_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bad_q <= 1'b0;
    else        bad_q <= start && idx_of(cfg.op) == NMOD;

  assign done = |dn || bad_q;

  // only one module may work at a time
  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bz));
endmodule
