// ds_top_sigs.svh: declarations of every signal connecting ds_top and
// ds_top_harness, by the names of ds_top's ports. Expects the localparams
// NUM_TM, TPS, GW, SW, LW and AW and the ds_pkg types in scope.
  logic               clk;
  logic               rst_n;
  logic               cfg_we;
  logic [GW-1:0]      cfg_seg;
  logic [LADDR_W-1:0] cfg_line;
  logic [LW:0]        cfg_nlines;
  logic [GW-1:0]      cfg_first_child;
  logic [GW:0]        cfg_nchild;
  logic [BADDR_W-1:0] bucket_base;
  logic               start;
  logic               busy;
  logic               pass_done;
  logic               hits_idle;
  logic [TPS-1:0]     tp_ray_req  [NUM_TM];
  logic [TPS-1:0]     tp_ray_gnt  [NUM_TM];
  logic [TPS-1:0]     tp_ray_done [NUM_TM];
  ray_t               tp_ray      [NUM_TM];
  logic [SW-1:0]      tp_ray_slot [NUM_TM];
  logic [TPS-1:0]     tp_div_req  [NUM_TM];
  vec3_t              tp_div_dir  [NUM_TM][TPS];
  logic [TPS-1:0]     tp_div_gnt  [NUM_TM];
  logic [TPS-1:0]     tp_div_done [NUM_TM];
  dvec3_t             tp_div_inv  [NUM_TM];
  logic [TPS-1:0]     tp_box_req  [NUM_TM];
  box_op_t            tp_box_op   [NUM_TM][TPS];
  logic [TPS-1:0]     tp_box_gnt  [NUM_TM];
  logic [TPS-1:0]     tp_box_done [NUM_TM];
  logic               tp_box_hit  [NUM_TM];
  dist_t              tp_box_tnear[NUM_TM];
  logic [TPS-1:0]     tp_tri_req  [NUM_TM];
  tri_op_t            tp_tri_op   [NUM_TM][TPS];
  logic [TPS-1:0]     tp_tri_gnt  [NUM_TM];
  logic [TPS-1:0]     tp_tri_done [NUM_TM];
  logic [TPS-1:0]     tp_tri_hit  [NUM_TM];
  dist_t              tp_tri_t    [NUM_TM][TPS];
  logic [TPS-1:0]     tp_l1_req   [NUM_TM];
  logic [AW-1:0]      tp_l1_addr  [NUM_TM][TPS];
  logic [TPS-1:0]     tp_l1_gnt   [NUM_TM];
  logic [TPS-1:0]     tp_l1_done  [NUM_TM];
  logic [LINE_W-1:0]  tp_l1_data  [NUM_TM];
  logic [TPS-1:0]     tp_rq_req   [NUM_TM];
  logic [TPS-1:0]     tp_rq_fin   [NUM_TM];
  logic [GW-1:0]      tp_rq_dst   [NUM_TM][TPS];
  ray_t               tp_rq_ray   [NUM_TM][TPS];
  logic [TPS-1:0]     tp_rq_gnt   [NUM_TM];
  logic [TPS-1:0]     tp_hit_req  [NUM_TM];
  hit_upd_t           tp_hit      [NUM_TM][TPS];
  logic [TPS-1:0]     tp_hit_gnt  [NUM_TM];
  logic               sc_req_valid;
  logic               sc_req_ready;
  scene_mem_req_t     sc_req;
  logic               sc_resp_valid;
  logic [LINE_W-1:0]  sc_resp_data;
  logic               rm_req_valid;
  logic               rm_req_ready;
  ray_mem_req_t       rm_req;
  logic               rm_resp_valid;
  logic [SLOT_W-1:0]  rm_resp_data;
  logic               hm_req_valid;
  logic               hm_req_ready;
  hit_mem_req_t       hm_req;
  logic               hm_resp_valid;
  hit_rec_t           hm_resp_data;
  logic [31:0]        n_seg_done;
  logic [31:0]        n_seg_skipped;
  logic [31:0]        n_bkt_alloc;
  logic [31:0]        n_bkt_read;
  logic [31:0]        n_affinity;
  logic [31:0]        n_rays_written;
  logic [31:0]        n_hit_merged;
  logic [31:0]        n_hit_written;
  logic [31:0]        n_hit_stall;
  logic [31:0]        l1_hits     [NUM_TM];
  logic [31:0]        l1_misses   [NUM_TM];
  logic l1_flush_mon;
