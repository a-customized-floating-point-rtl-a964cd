// s25fl_model: behavioural model of a SPI NOR flash (S25FL256S command
// subset) for the testbenches; not synthesizable logic.
//
// Mode 0: commands and data are sampled on the rising edge of sck, output
// data change on the falling edge. Supported commands: READ (03h, 3-byte
// address, continuous), WREN (06h), WRDI (04h), RDSR (05h, status repeated
// while cs_n is low; bit 0 WIP, bit 1 WEL), PP (02h, programs bytes by
// AND-ing them into the array) and SE (D8h, erases the 64 KB sector, here
// the whole modelled array). PP and SE need WEL and set WIP, which clears
// after BUSY_POLLS status bytes have been read, standing in for the
// program/erase time. Only MEM_BYTES bytes are modelled; addresses wrap.
// Counters n_read, n_pp, n_se and n_busy_polls let testbenches see what
// happened.
module s25fl_model #(
  parameter int unsigned MEM_BYTES  = 1024,
  parameter int unsigned BUSY_POLLS = 3
) (
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [MEM_BYTES];
  logic [7:0] sh_in, cmd, out_sh;
  int         bitcnt, byte_idx, out_cnt, busy_left;
  logic [23:0] addr;
  logic       out_active, wel, wip;
  int         n_read = 0, n_pp = 0, n_se = 0, n_busy_polls = 0, n_prog_bytes = 0;

  initial begin
    foreach (mem[i]) mem[i] = 8'hFF;
    miso = 1'b0;
    wel = 1'b0;
    wip = 1'b0;
    busy_left = 0;
    out_active = 1'b0;
    bitcnt = 0;
    byte_idx = 0;
    out_cnt = 0;
    cmd = 8'h00;
    addr = '0;
    sh_in = '0;
    out_sh = '0;
  end

  function automatic logic [7:0] status_byte();
    return {6'd0, wel, wip};
  endfunction

  task automatic load_next_status();
    out_sh = status_byte();
    if (wip) begin
      n_busy_polls++;
      if (busy_left > 0) busy_left--;
      if (busy_left == 0) wip = 1'b0;
    end
  endtask

  always @(negedge cs_n) begin
    bitcnt     = 0;
    byte_idx   = 0;
    out_cnt    = 0;
    out_active = 1'b0;
  end

  always @(posedge cs_n) begin
    out_active = 1'b0;
    if (byte_idx >= 1) begin
      case (cmd)
        8'h06: wel = 1'b1;
        8'h04: wel = 1'b0;
        8'h02: if (wel && byte_idx >= 5) begin
          n_pp++;
          wel = 1'b0;
          wip = 1'b1;
          busy_left = BUSY_POLLS;
        end
        8'hD8: if (wel && byte_idx >= 4) begin
          n_se++;
          foreach (mem[i]) mem[i] = 8'hFF;
          wel = 1'b0;
          wip = 1'b1;
          busy_left = BUSY_POLLS;
        end
        default: ;
      endcase
    end
  end

  always @(posedge sck) begin
    if (!cs_n) begin
      sh_in = {sh_in[6:0], mosi};
      bitcnt++;
      if (bitcnt == 8) begin
        bitcnt = 0;
        if (byte_idx == 0) begin
          cmd = sh_in;
          if (cmd == 8'h05) begin
            out_active = 1'b1;
            out_cnt = 0;
            load_next_status();
          end
        end else if (byte_idx <= 3) begin
          addr = {addr[15:0], sh_in};
          if (byte_idx == 3 && cmd == 8'h03) begin
            n_read++;
            out_active = 1'b1;
            out_cnt = 0;
            out_sh = mem[addr % MEM_BYTES];
          end
        end else if (cmd == 8'h02 && wel && !wip) begin
          mem[addr % MEM_BYTES] = mem[addr % MEM_BYTES] & sh_in;
          n_prog_bytes++;
          addr[7:0] = addr[7:0] + 8'd1;   // wraps within the page
        end
        byte_idx++;
      end
    end
  end

  always @(negedge sck) begin
    if (!cs_n && out_active) begin
      miso = out_sh[7];
      out_sh = {out_sh[6:0], 1'b0};
      out_cnt++;
      if (out_cnt == 8) begin
        out_cnt = 0;
        if (cmd == 8'h03) begin
          addr = addr + 24'd1;
          out_sh = mem[addr % MEM_BYTES];
        end else begin
          load_next_status();
        end
      end
    end
  end
endmodule
