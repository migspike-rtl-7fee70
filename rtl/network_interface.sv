// network_interface: the node's network interface (NI) and time-step controller.
//
// It sits between the router's local port and the neuron cluster and has four
// parts.
//  * Flit extractor: an arriving flit is a spike (pushed into the incoming
//    spike FIFO) or a memory access (handed to the memory-access unit); stray
//    replies are dropped.
//  * Input path: each buffered spike is decoded into the weight-memory row
//    (its AER) and a neuron mask, read from the PE-ID lookup table with the
//    flit's PE-ID, and handed to the cluster, one spike per cycle.
//  * Memory-access unit: single reads/writes and bursts. A burst write header
//    carries the start address and the length in its data field and is
//    followed by that many MEM_DATA flits written to consecutive addresses; a
//    burst read of length L returns L replies. Every read is answered with an
//    FT_REPLY flit (address and data) that the network carries to the host.
//    Targets: the cluster (weights, neuron registers, spike vector), the
//    PE-ID LUT, the AER/Address LUTs, the migration base and the control and
//    status registers (address map in migspike_pkg).
//  * Time-step controller and output path: writing bit 0 of the control
//    register requests the end of the time step. The controller waits until
//    the spike FIFO is empty, pulses step to the cluster, waits for the
//    post-synaptic spike vector, loads it into the AER encoder and lets the
//    output remap LUT turn each firing neuron into a spike flit. It returns
//    to idle when the last flit has left and counts the step. Bit 1 of the
//    control register clears the potentials.
// Replies have priority over spike flits at the output.
//
// Timing: a spike flit accepted in cycle t reaches the membrane potential
// three cycles later at the earliest (FIFO, row read, accumulate). A single
// read is answered two cycles after the request is accepted if the output is
// free.
//
// From the architecture: spike/memory-access classification, single and
// burst accesses, PE-ID based input sparsity, serial AER encoding of the
// output spike vector, remapping through the AER and Address LUTs, a
// controller that works per time step and is synchronised over the network.
// This design's choices: the flit fields, the address map, the burst
// framing, synchronisation by a control-register write from the host, FIFO
// depth and reply priority.
module network_interface
  import migspike_pkg::*;
#(
  parameter int unsigned NEURONS    = 256,
  parameter int unsigned AXONS      = 256,
  parameter int unsigned PEID_N     = 8,
  parameter int unsigned LUT_DEPTH  = 256,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from the router's local output
  input  logic                        in_valid,
  output logic                        in_ready,
  input  flit_t                       in_flit,
  // to the router's local input
  output logic                        out_valid,
  input  logic                        out_ready,
  output flit_t                       out_flit,
  // to / from the neuron cluster
  output logic                        ax_valid,
  output logic [$clog2(AXONS)-1:0]    ax_row,
  output logic [NEURONS-1:0]          ax_mask,
  output logic                        step,
  output logic                        clear,
  input  logic [NEURONS-1:0]          spike_vec,
  input  logic                        spike_vec_valid,
  output logic                        cfg_en,
  output logic                        cfg_we,
  output logic [ADDR_W-1:0]           cfg_addr,
  output logic [DATA_W-1:0]           cfg_wdata,
  input  logic [DATA_W-1:0]           cfg_rdata,
  // status
  output logic                        busy,
  output logic [7:0]                  step_count
);
  localparam int unsigned PW = $clog2(PEID_N);
  localparam int unsigned WW = (NEURONS / DATA_W > 1) ? $clog2(NEURONS / DATA_W) : 1;

  // ================================================================ flit extractor
  mem_pl_t   in_mem;
  spike_pl_t in_spk;
  logic      fifo_in_ready, mem_can_accept, mem_take;

  assign in_mem = mem_pl_t'(in_flit.payload);
  assign in_spk = spike_pl_t'(in_flit.payload);

  always_comb begin
    unique case (in_flit.ftype)
      FT_SPIKE: in_ready = fifo_in_ready;
      FT_MEM:   in_ready = mem_can_accept;
      default:  in_ready = 1'b1;   // drop anything else
    endcase
  end
  assign mem_take = in_valid && (in_flit.ftype == FT_MEM) && mem_can_accept;

  // ================================================================ input spike path
  spike_pl_t          head;
  logic               fifo_valid;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  flit_fifo #(.T(spike_pl_t), .DEPTH(FIFO_DEPTH)) u_spike_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && (in_flit.ftype == FT_SPIKE)),
    .in_ready  (fifo_in_ready),
    .in_data   (in_spk),
    .out_valid (fifo_valid),
    .out_ready (1'b1),
    .out_data  (head),
    .count     (fifo_count)
  );

  // access decode (memory-access unit, below)
  logic              acc_en, acc_we;
  logic [ADDR_W-1:0] acc_addr;
  logic [DATA_W-1:0] acc_wdata;
  logic [3:0]        acc_region, acc_sub;
  logic              acc_cluster, acc_peid, acc_aerlut, acc_adrlut, acc_ctrl;

  logic [DATA_W-1:0] pe_rdata;

  pe_id_lut #(.NEURONS(NEURONS), .ENTRIES(PEID_N), .WORD_W(DATA_W)) u_peid (
    .clk      (clk),
    .rst_n    (rst_n),
    .pe_id    (head.pe_id[PW-1:0]),
    .mask     (ax_mask),
    .wr_en    (acc_en && acc_we && acc_peid),
    .wr_entry (acc_addr[4 +: PW]),
    .wr_word  (acc_addr[WW-1:0]),
    .wr_data  (acc_wdata),
    .rd_entry (acc_addr[4 +: PW]),
    .rd_word  (acc_addr[WW-1:0]),
    .rd_data  (pe_rdata)
  );

  assign ax_valid = fifo_valid;
  assign ax_row   = head.aer[$clog2(AXONS)-1:0];

  // ================================================================ output path
  logic                enc_valid, enc_ready, enc_busy, enc_load;
  logic [AER_W-1:0]    enc_aer;
  logic [$clog2(NEURONS)-1:0] enc_idx;
  logic                rm_valid, rm_ready, rm_busy;
  flit_t               rm_flit;
  logic [DATA_W-1:0]   rm_rdata;
  logic [AER_W:0]      mig_base;

  aer_encoder #(.NEURONS(NEURONS)) u_enc (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (enc_load),
    .spikes (spike_vec),
    .valid  (enc_valid),
    .ready  (enc_ready),
    .aer    (enc_idx),
    .busy   (enc_busy)
  );
  assign enc_aer = AER_W'(enc_idx);

  output_remap_lut #(.NEURONS(NEURONS), .LUT_DEPTH(LUT_DEPTH)) u_remap (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (enc_valid),
    .in_ready   (enc_ready),
    .in_aer     (enc_aer),
    .out_valid  (rm_valid),
    .out_ready  (rm_ready),
    .out_flit   (rm_flit),
    .busy       (rm_busy),
    .base_we    (acc_en && acc_we && acc_ctrl && acc_addr[7:0] == CTRL_BASE),
    .base_wdata (acc_wdata[AER_W:0]),
    .base       (mig_base),
    .wr_en      (acc_en && acc_we && (acc_aerlut || acc_adrlut)),
    .wr_sel     (acc_adrlut),
    .wr_idx     (acc_addr[AER_W-1:0]),
    .wr_data    (acc_wdata),
    .rd_sel     (acc_adrlut),
    .rd_idx     (acc_addr[AER_W-1:0]),
    .rd_data    (rm_rdata)
  );

  // ================================================================ time-step controller
  typedef enum logic [2:0] { C_IDLE, C_DRAIN, C_STEP, C_WAIT, C_EMIT } cstate_e;
  cstate_e cstate;
  logic    step_req, step_wr, clear_wr;

  assign step_wr  = acc_en && acc_we && acc_ctrl && (acc_addr[7:0] == CTRL_STEP) && acc_wdata[0];
  assign clear_wr = acc_en && acc_we && acc_ctrl && (acc_addr[7:0] == CTRL_STEP) && acc_wdata[1];

  assign step     = (cstate == C_STEP);
  assign clear    = clear_wr;
  assign enc_load = (cstate == C_WAIT) && spike_vec_valid;
  assign busy     = (cstate != C_IDLE) || step_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate     <= C_IDLE;
      step_req   <= 1'b0;
      step_count <= '0;
    end else begin
      if (step_wr) step_req <= 1'b1;
      unique case (cstate)
        C_IDLE:  if (step_req) cstate <= C_DRAIN;
        C_DRAIN: if (fifo_count == '0) cstate <= C_STEP;
        C_STEP:  begin
          cstate   <= C_WAIT;
          step_req <= step_wr;
        end
        C_WAIT:  if (spike_vec_valid) cstate <= C_EMIT;
        C_EMIT:  if (!enc_busy && !rm_busy) begin
          cstate     <= C_IDLE;
          step_count <= step_count + 1'b1;
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // ================================================================ memory-access unit
  typedef enum logic [2:0] { M_IDLE, M_WBURST, M_RBURST, M_RD, M_REPLY } mstate_e;
  mstate_e           mstate;
  logic [ADDR_W-1:0] bst_addr, rd_addr_q;
  logic [DATA_W-1:0] bst_left;
  logic              rd_ni_q;
  logic [DATA_W-1:0] ni_rdata, ni_rdata_q;
  flit_t             reply;
  logic              reply_valid, reply_sent;

  assign mem_can_accept = (mstate == M_IDLE) || (mstate == M_WBURST);

  always_comb begin
    acc_en    = 1'b0;
    acc_we    = 1'b0;
    acc_addr  = in_mem.addr;
    acc_wdata = in_mem.data;
    unique case (mstate)
      M_IDLE: if (mem_take) begin
        acc_en = (in_mem.cmd == MEM_WR) || (in_mem.cmd == MEM_RD);
        acc_we = (in_mem.cmd == MEM_WR);
      end
      M_WBURST: if (mem_take) begin
        acc_en   = 1'b1;
        acc_we   = 1'b1;
        acc_addr = bst_addr;
      end
      M_RBURST: begin
        acc_en   = 1'b1;
        acc_addr = bst_addr;
      end
      default: ;
    endcase
  end

  assign acc_region  = acc_addr[19:16];
  assign acc_sub     = acc_addr[11:8];
  assign acc_peid    = (acc_region == REG_NODE) && (acc_sub == SUB_PEID);
  assign acc_aerlut  = (acc_region == REG_NODE) && (acc_sub == SUB_AERLUT);
  assign acc_adrlut  = (acc_region == REG_NODE) && (acc_sub == SUB_ADRLUT);
  assign acc_ctrl    = (acc_region == REG_NODE) && (acc_sub == SUB_CTRL);
  assign acc_cluster = (acc_region == REG_WEIGHT) ||
                       ((acc_region == REG_NODE) && (acc_sub <= SUB_VMEM || acc_sub == SUB_SPIKES));

  assign cfg_en    = acc_en && acc_cluster;
  assign cfg_we    = acc_we;
  assign cfg_addr  = acc_addr;
  assign cfg_wdata = acc_wdata;

  always_comb begin
    ni_rdata = '0;
    if (acc_peid)                 ni_rdata = pe_rdata;
    else if (acc_aerlut || acc_adrlut) ni_rdata = rm_rdata;
    else if (acc_ctrl) begin
      unique case (acc_addr[7:0])
        CTRL_BASE:   ni_rdata = DATA_W'(mig_base);
        CTRL_STATUS: ni_rdata = {step_count, 7'd0, busy};
        default:     ni_rdata = '0;
      endcase
    end
  end

  assign reply_sent = reply_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate      <= M_IDLE;
      bst_addr    <= '0;
      bst_left    <= '0;
      rd_addr_q   <= '0;
      rd_ni_q     <= 1'b0;
      ni_rdata_q  <= '0;
      reply       <= '0;
      reply_valid <= 1'b0;
    end else begin
      if (acc_en && !acc_we) begin
        rd_addr_q  <= acc_addr;
        rd_ni_q    <= !acc_cluster;
        ni_rdata_q <= ni_rdata;
      end
      unique case (mstate)
        M_IDLE: if (mem_take) begin
          unique case (in_mem.cmd)
            MEM_RD: mstate <= M_RD;
            MEM_WR_BST, MEM_RD_BST: begin
              bst_addr <= in_mem.addr;
              bst_left <= in_mem.data;
              if (in_mem.data != '0)
                mstate <= (in_mem.cmd == MEM_WR_BST) ? M_WBURST : M_RBURST;
            end
            default: ;
          endcase
        end
        M_WBURST: if (mem_take) begin
          bst_addr <= bst_addr + 1'b1;
          bst_left <= bst_left - 1'b1;
          if (bst_left == DATA_W'(1)) mstate <= M_IDLE;
        end
        M_RBURST: begin
          bst_addr <= bst_addr + 1'b1;
          bst_left <= bst_left - 1'b1;
          mstate   <= M_RD;
        end
        M_RD: begin
          reply       <= make_mem(FT_REPLY, '0, MEM_RD, rd_addr_q,
                                  rd_ni_q ? ni_rdata_q : cfg_rdata);
          reply_valid <= 1'b1;
          mstate      <= M_REPLY;
        end
        M_REPLY: if (reply_sent) begin
          reply_valid <= 1'b0;
          mstate      <= (bst_left != '0) ? M_RBURST : M_IDLE;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  // ================================================================ output arbiter
  assign out_valid = reply_valid || rm_valid;
  assign out_flit  = reply_valid ? reply : rm_flit;
  assign rm_ready  = out_ready && !reply_valid;

endmodule
