// tb_access_check -- checks region classification and the per-mode access
// rules with random addresses near the region bounds, in every mode, for
// loads and stores, user and supervisor, against a reference model.
module tb_access_check;
  import aegis_pkg::*;

  sec_mode_e     mode;
  logic          supervisor, we;
  region_map_t   regions;
  addr_t         addr;
  access_class_t cls;
  int checks = 0, failures = 0;

  access_check dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic inr(addr_t b, addr_t l, addr_t a);
    return a >= b && a < l;
  endfunction

  initial begin
    addr_t pts [12];
    regions.iv_user_static = '{32'h1000, 32'h2000};
    regions.me_user_static = '{32'h1800, 32'h2800};  // overlaps IV
    regions.iv_sup_static  = '{32'h4000, 32'h5000};
    regions.me_sup_static  = '{32'h4000, 32'h4800};
    regions.iv_dynamic     = '{32'h8000, 32'hC000};
    regions.me_dynamic     = '{32'hA000, 32'hE000};
    pts = '{32'h1000, 32'h1800, 32'h2000, 32'h2800, 32'h4000, 32'h4800,
            32'h5000, 32'h8000, 32'hA000, 32'hC000, 32'hE000, 32'h0};
    for (int n = 0; n < 4000; n++) begin
      logic ivs, mes, ivss, mess, ivd, med, f;
      addr = pts[$urandom_range(11)] + 32'($urandom_range(0, 64)) - 32'd32;
      mode = sec_mode_e'($urandom_range(3));
      supervisor = $urandom_range(1);
      we = $urandom_range(1);
      #1;
      ivs  = inr(32'h1000, 32'h2000, addr);
      mes  = inr(32'h1800, 32'h2800, addr);
      ivss = inr(32'h4000, 32'h5000, addr);
      mess = inr(32'h4000, 32'h4800, addr);
      ivd  = inr(32'h8000, 32'hC000, addr);
      med  = inr(32'hA000, 32'hE000, addr);
      case (mode)
        MODE_STD, MODE_SSP: f = ivs | mes | ivss | mess | ivd | med;
        MODE_TE:            f = mes | mess | med;
        default:            f = 1'b0;
      endcase
      if (we && (ivs | mes | ivss | mess)) f = 1'b1;
      if (!supervisor && (ivss | mess)) f = 1'b1;
      checks++;
      if (cls.fault !== f || cls.iv_static !== (ivs | ivss) || cls.iv_dynamic !== ivd ||
          cls.me_static !== (mes | mess) || cls.me_dynamic !== med || cls.sup_static !== (ivss | mess)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h mode=%0d sup=%0d we=%0d cls=%b fault exp %0d",
                                    addr, mode, supervisor, we, cls, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
