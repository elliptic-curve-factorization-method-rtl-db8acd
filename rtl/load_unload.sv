// load_unload: link between the server and the phase-1 engine.
//
// Input words pass a FIFO and the deserializer and are stored in the RAM
// buffer as the next batch: NC data sets of 8 numbers each, in the order
// x_2P0, z_2P0, x_P0, z_P0, a24, n, ns~, n'.  When the engine is idle, has no
// unsaved results and a full batch is waiting, the batch is copied into the
// working RAMs (one number per cycle on the ld_* bus; x_P0 is written both as
// x_Q in C0 and as x_{P-Q} in D1) and the engine is started.  When the engine
// finishes, the result x_Q, z_Q of every curve is copied from RAM C and D
// location 0 into the buffer (sv_* read, buffer input multiplexer 0/1/2 =
// deserializer / C / D) and then serialized out, x_Q then z_Q per curve.
// Because the buffer receives the next batch and sends the previous results
// while a phase 1 runs, the engine only stops for the 8*NC-cycle copy and the
// 2*NC-cycle save.  The buffer holds 10*NC numbers: data at 0..8NC-1,
// results at 8NC..10NC-1.  Data order, buffer layout and sequencing are this
// design's choice.
module load_unload
  import ecm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic            clk,
  input  logic            rst_n,
  // server side
  input  logic            io_in_valid,
  output logic            io_in_ready,
  input  logic [IO_W-1:0] io_in_data,
  output logic            io_out_valid,
  input  logic            io_out_ready,
  output logic [IO_W-1:0] io_out_data,
  // engine control
  output logic            core_start,
  input  logic            core_done,
  // write bus into the working and constant RAMs (copy of a batch)
  output logic [6:0]      ld_we,     // A, B, C, D, n, ns~, n'
  output logic [3:0]      ld_loc,    // location in banks D, C, B, A
  output logic [NC_W-1:0] ld_curve,
  output word_t           ld_data,
  // result read from RAM C and D, location 0
  output logic            sv_re,
  output logic [NC_W-1:0] sv_curve,
  input  word_t           sv_c_data,
  input  word_t           sv_d_data
);
  localparam int unsigned NDATA = 8 * NC;
  localparam int unsigned NRES  = 2 * NC;
  localparam int unsigned DEPTH = NDATA + NRES;
  localparam int unsigned BAW   = $clog2(DEPTH);

  // ---------------- FIFOs and serial/parallel converter ----------------
  logic            fi_valid, fi_ready, fo_valid, fo_ready;
  logic [IO_W-1:0] fi_data, fo_data;
  logic            p_valid, p_ready, q_valid, q_ready;
  word_t           p_data, q_data;

  sync_fifo #(.WIDTH(IO_W), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .clk, .rst_n, .in_valid(io_in_valid), .in_ready(io_in_ready), .in_data(io_in_data),
    .out_valid(fi_valid), .out_ready(fi_ready), .out_data(fi_data));
  sync_fifo #(.WIDTH(IO_W), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .clk, .rst_n, .in_valid(fo_valid), .in_ready(fo_ready), .in_data(fo_data),
    .out_valid(io_out_valid), .out_ready(io_out_ready), .out_data(io_out_data));
  serpar #(.W(W), .IO_W(IO_W)) u_serpar (
    .clk, .rst_n,
    .s_valid(fi_valid), .s_ready(fi_ready), .s_data(fi_data),
    .p_valid, .p_ready, .p_data,
    .q_valid, .q_ready, .q_data,
    .m_valid(fo_valid), .m_ready(fo_ready), .m_data(fo_data));

  // ---------------- RAM buffer ----------------
  logic           b_we;
  logic [BAW-1:0] b_waddr, b_raddr;
  word_t          b_wdata, b_rdata;
  ram_bank #(.WIDTH(W), .DEPTH(DEPTH)) u_buffer (
    .clk, .we(b_we), .waddr(b_waddr), .wdata(b_wdata), .raddr(b_raddr), .rdata(b_rdata));

  // ---------------- sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_SAVE, S_LOAD, S_RUN} seq_e;
  seq_e           seq;
  logic [BAW-1:0] fill_idx;     // next data slot for the deserializer
  logic           data_ready;   // a full batch waits in the buffer
  logic           have_res;     // engine holds unsaved results
  logic           res_valid;    // buffer holds results not yet sent
  logic [BAW-1:0] sq_idx;       // save / load counter
  logic           sq_act;       // a read was issued last cycle
  logic [BAW-1:0] sq_prev;      // its index

  // unload
  typedef enum logic [1:0] {U_IDLE, U_RD, U_CAP, U_SEND} unl_e;
  unl_e           ust;
  logic [BAW-1:0] u_idx;
  word_t          u_word;

  wire fill_ok   = !data_ready && (seq != S_SAVE);
  assign p_ready = fill_ok;

  // buffer write port: mux 0/1/2 = deserializer / RAM C / RAM D
  always_comb begin
    b_we    = 1'b0;
    b_waddr = fill_idx;
    b_wdata = p_data;
    if (seq == S_SAVE && sq_act) begin
      b_we    = 1'b1;
      b_waddr = BAW'(NDATA) + sq_prev;
      b_wdata = sq_prev[0] ? sv_d_data : sv_c_data;
    end else if (p_valid && fill_ok) begin
      b_we    = 1'b1;
    end
  end

  // buffer read port: batch copy has priority over unloading
  assign b_raddr = (seq == S_LOAD) ? sq_idx : BAW'(NDATA) + u_idx;

  // RAM C/D read for the save
  assign sv_re    = (seq == S_SAVE) && (sq_idx < BAW'(NRES));
  assign sv_curve = NC_W'(sq_idx >> 1);

  // batch copy: the buffer word read last cycle goes to its RAM
  logic [2:0] ld_slot;
  always_comb begin
    ld_slot  = sq_prev[2:0];
    ld_curve = NC_W'(sq_prev >> 3);
    ld_data  = b_rdata;
    ld_we    = '0;
    ld_loc   = '0;
    if (seq == S_LOAD && sq_act) begin
      unique case (ld_slot)
        3'd0: ld_we = 7'b0000001;                       // x_2P0 -> A0
        3'd1: ld_we = 7'b0000010;                       // z_2P0 -> B0
        3'd2: begin ld_we = 7'b0001100; ld_loc = 4'b1000; end // x_P0 -> C0, D1
        3'd3: ld_we = 7'b0001000;                       // z_P0 -> D0
        3'd4: begin ld_we = 7'b0000100; ld_loc = 4'b0100; end // a24 -> C1
        3'd5: ld_we = 7'b0010000;                       // n
        3'd6: ld_we = 7'b0100000;                       // ns~
        default: ld_we = 7'b1000000;                    // n'
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq        <= S_IDLE;
      fill_idx   <= '0;
      data_ready <= 1'b0;
      have_res   <= 1'b0;
      res_valid  <= 1'b0;
      sq_idx     <= '0;
      sq_act     <= 1'b0;
      sq_prev    <= '0;
      core_start <= 1'b0;
      ust        <= U_IDLE;
      u_idx      <= '0;
      u_word     <= '0;
    end else begin
      core_start <= 1'b0;
      // deserializer -> buffer
      if (p_valid && fill_ok) begin
        if (fill_idx == BAW'(NDATA - 1)) begin
          fill_idx   <= '0;
          data_ready <= 1'b1;
        end else fill_idx <= fill_idx + 1'b1;
      end
      // sequencer
      unique case (seq)
        S_IDLE: begin
          sq_idx <= '0;
          sq_act <= 1'b0;
          if (have_res && !res_valid) seq <= S_SAVE;
          else if (!have_res && data_ready) seq <= S_LOAD;
        end
        S_SAVE: begin
          sq_act  <= (sq_idx < BAW'(NRES));
          sq_prev <= sq_idx;
          if (sq_idx == BAW'(NRES)) begin
            have_res  <= 1'b0;
            res_valid <= 1'b1;
            seq       <= S_IDLE;
          end else sq_idx <= sq_idx + 1'b1;
        end
        S_LOAD: begin
          sq_act  <= (sq_idx < BAW'(NDATA));
          sq_prev <= sq_idx;
          if (sq_idx == BAW'(NDATA)) begin
            data_ready <= 1'b0;
            core_start <= 1'b1;
            seq        <= S_RUN;
          end else sq_idx <= sq_idx + 1'b1;
        end
        default: if (core_done) begin  // S_RUN
          have_res <= 1'b1;
          seq      <= S_IDLE;
        end
      endcase
      // unload
      unique case (ust)
        U_IDLE: if (res_valid && seq != S_SAVE) begin u_idx <= '0; ust <= U_RD; end
        U_RD:   if (seq != S_LOAD) ust <= U_CAP;
        U_CAP:  begin u_word <= b_rdata; ust <= U_SEND; end
        default: if (q_ready) begin  // U_SEND
          if (u_idx == BAW'(NRES - 1)) begin
            res_valid <= 1'b0;
            ust       <= U_IDLE;
          end else begin
            u_idx <= u_idx + 1'b1;
            ust   <= U_RD;
          end
        end
      endcase
    end
  end

  assign q_valid = (ust == U_SEND);
  assign q_data  = u_word;
endmodule
